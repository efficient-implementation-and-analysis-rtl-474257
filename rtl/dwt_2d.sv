// dwt_2d - level-by-level 2-D Haar DWT engine with its frame memory.
//
// The frame arrives as a raster stream of 8-bit grey pixels, which are
// stored in the frame memory as 16-bit fixed-point coefficients with
// FRAC = 2*LEVELS fractional bits. As soon as the last pixel is written the
// transform starts by itself and runs LEVELS levels. Each level works on
// the current low-low square of side S (S = N, N/2, N/4, ...): first every
// row of the square, then every column. One line is copied from the frame
// memory into an internal line buffer (S reads), then for each pair
// (a, b) = (line[2n], line[2n+1]) two MAC units evaluate both filters at
// once, the low pass (a + b)/2 and the high pass a - b, as two Booth
// multiply(-accumulate) steps with the taps of dwt_pkg. The low output is
// written back to position n of the line and the high output to position
// S/2 + n, so the square ends up in the usual Mallat layout: LL top left,
// HL top right, LH bottom left, HH bottom right. With the fractional bits
// chosen as above every average is exact.
//
// Timing: one line takes S + 4*(S/2) + 1 = 3S + 1 clocks (read, four clocks
// per pair: MUL, MAC, write L, write H, then one clock to advance), a level
// 2*S*(3S + 1) clocks. done rises when the last level ends; the memory is
// then readable through rd_* (one clock latency) until release is pulsed,
// which returns the engine to loading the next frame.
//
// From the document: the 2-D DWT done as a 1-D transform on the rows
// followed by one on the columns, with intermediate results kept in memory
// and a single processing module (level by level); three levels; 8-bit
// pixels in and 16-bit coefficients; the Haar averages and differences;
// the multiplier-based filter. This design's own choices: the line buffer,
// the in-place layout, the fixed-point format, the two MACs, the pixel and
// read interfaces and the synchronous active-low reset.
module dwt_2d
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 512,   // image side, a power of two
  parameter int unsigned LEVELS = 3,     // decomposition levels
  localparam int unsigned AW    = 2 * $clog2(N),
  localparam int unsigned LW    = $clog2(N),
  localparam int unsigned FRAC  = 2 * LEVELS
) (
  input  logic              clk,
  input  logic              rst_n,
  // pixel stream, raster order, N*N pixels per frame
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix,
  output logic              pix_ready,   // high while the frame is loading
  // status
  output logic              busy,        // transform running
  output logic              done,        // coefficients ready to read
  output logic              row_pass,    // busy with rows (else columns)
  output logic [1:0]        level,       // level being computed, 0 = first
  input  logic              release_frame,
  // coefficient read port, valid while done
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [COEF_W-1:0] rd_data
);

  typedef enum logic [2:0] {
    ST_LOAD, ST_READ, ST_CALC, ST_NEXT, ST_DONE
  } state_e;

  state_e            state;
  logic [AW-1:0]     load_cnt;
  logic [LW:0]       size;        // current square side S
  logic [LW-1:0]     line;        // row or column index
  logic [LW-1:0]     k;           // read index along the line
  logic [LW-1:0]     n;           // pair index
  logic [1:0]        step;
  logic              dir_col;
  logic [1:0]        lvl;

  logic [COEF_W-1:0] linebuf [N];
  logic              cap_valid;
  logic [LW-1:0]     cap_idx;

  // frame memory port
  logic              m_we, m_re;
  logic [AW-1:0]     m_addr;
  logic [COEF_W-1:0] m_wdata, m_rdata;

  frame_mem #(.WIDTH(COEF_W), .DEPTH(N * N)) u_mem (
    .clk(clk), .we(m_we), .re(m_re), .addr(m_addr),
    .wdata(m_wdata), .rdata(m_rdata)
  );

  // MAC units: low pass and high pass
  logic                    mac_en, mac_mode;
  logic signed [OPND_W-1:0] mac_x, tap_lp, tap_hp;
  logic signed [ACC_W-1:0]  acc_lp, acc_hp;

  mac_unit u_mac_lp (
    .clk(clk), .rst_n(rst_n), .clr(1'b0), .en(mac_en), .acc_mode(mac_mode),
    .x(mac_x), .y(tap_lp), .acc(acc_lp)
  );
  mac_unit u_mac_hp (
    .clk(clk), .rst_n(rst_n), .clr(1'b0), .en(mac_en), .acc_mode(mac_mode),
    .x(mac_x), .y(tap_hp), .acc(acc_hp)
  );

  // address of element j of the current line
  function automatic logic [AW-1:0] line_addr(input logic [LW-1:0] ln,
                                              input logic [LW-1:0] j,
                                              input logic          col);
    return col ? {j, ln} : {ln, j};
  endfunction

  logic [LW-1:0] half;
  logic [LW-1:0] idx_a, idx_b;
  logic signed [ACC_W-1:0] lp_shift, hp_shift;

  assign half     = LW'(size >> 1);
  assign idx_a    = {n[LW-2:0], 1'b0};
  assign idx_b    = {n[LW-2:0], 1'b1};
  assign lp_shift = acc_lp >>> TAP_FRAC;
  assign hp_shift = acc_hp >>> TAP_FRAC;

  always_comb begin
    m_we     = 1'b0;
    m_re     = 1'b0;
    m_addr   = '0;
    m_wdata  = '0;
    mac_en   = 1'b0;
    mac_mode = 1'b0;
    mac_x    = '0;
    tap_lp   = LP_TAP0;
    tap_hp   = HP_TAP0;
    unique case (state)
      ST_LOAD: begin
        m_we    = pix_valid;
        m_addr  = load_cnt;
        m_wdata = COEF_W'({1'b0, pix}) << FRAC;
      end
      ST_READ: begin
        m_re   = 1'b1;
        m_addr = line_addr(line, k, dir_col);
      end
      ST_CALC: begin
        unique case (step)
          2'd0: begin
            mac_en = 1'b1;
            mac_x  = OPND_W'(signed'(linebuf[idx_a]));
          end
          2'd1: begin
            mac_en   = 1'b1;
            mac_mode = 1'b1;
            mac_x    = OPND_W'(signed'(linebuf[idx_b]));
            tap_lp   = LP_TAP1;
            tap_hp   = HP_TAP1;
          end
          2'd2: begin
            m_we    = 1'b1;
            m_addr  = line_addr(line, n, dir_col);
            m_wdata = lp_shift[COEF_W-1:0];
          end
          default: begin
            m_we    = 1'b1;
            m_addr  = line_addr(line, half + n, dir_col);
            m_wdata = hp_shift[COEF_W-1:0];
          end
        endcase
      end
      ST_DONE: begin
        m_re   = rd_en;
        m_addr = rd_addr;
      end
      default: ;
    endcase
  end

  assign rd_data   = m_rdata;
  assign pix_ready = (state == ST_LOAD);
  assign busy      = (state == ST_READ) || (state == ST_CALC) || (state == ST_NEXT);
  assign done      = (state == ST_DONE);
  assign row_pass  = !dir_col;
  assign level     = lvl;

  // line buffer capture, one clock behind the read
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cap_valid <= 1'b0;
      cap_idx   <= '0;
    end else begin
      cap_valid <= (state == ST_READ);
      cap_idx   <= k;
    end
    if (cap_valid) linebuf[cap_idx] <= m_rdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_LOAD;
      load_cnt <= '0;
      size     <= (LW+1)'(N);
      line     <= '0;
      k        <= '0;
      n        <= '0;
      step     <= '0;
      dir_col  <= 1'b0;
      lvl      <= '0;
    end else begin
      unique case (state)
        ST_LOAD: if (pix_valid) begin
          load_cnt <= load_cnt + 1'b1;
          if (load_cnt == AW'(N * N - 1)) begin
            state   <= ST_READ;
            size    <= (LW+1)'(N);
            line    <= '0;
            k       <= '0;
            dir_col <= 1'b0;
            lvl     <= '0;
          end
        end
        ST_READ: begin
          k <= k + 1'b1;
          if ((LW+1)'(k) == size - 1'b1) begin
            state <= ST_CALC;
            n     <= '0;
            step  <= '0;
          end
        end
        ST_CALC: begin
          step <= step + 1'b1;
          if (step == 2'd3) begin
            n <= n + 1'b1;
            if (n == half - 1'b1) state <= ST_NEXT;
          end
        end
        ST_NEXT: begin
          k     <= '0;
          state <= ST_READ;
          if ((LW+1)'(line) == size - 1'b1) begin
            line <= '0;
            if (!dir_col) begin
              dir_col <= 1'b1;
            end else begin
              dir_col <= 1'b0;
              size    <= size >> 1;
              lvl     <= lvl + 1'b1;
              if (32'(lvl) == LEVELS - 1) state <= ST_DONE;
            end
          end else begin
            line <= line + 1'b1;
          end
        end
        ST_DONE: if (release_frame) begin
          state    <= ST_LOAD;
          load_cnt <= '0;
        end
        default: state <= ST_LOAD;
      endcase
    end
  end

endmodule
