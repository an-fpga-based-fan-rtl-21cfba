// operand_gen: recursive generation of the s' operands for one projection.
//
// For one projection angle theta it walks the IMG_N x IMG_N pixel grid, x in
// the outer loop and y in the inner loop, and delivers one pair per clock:
//     num = x cos + y sin                    (dividend of s')
//     U   = 1 + (x sin - y cos) / D          (divisor of s')
// with x, y = -IMG_N/2+1 .. IMG_N/2. No multiplier is used: as in the
// design's recursive algorithm, per angle
//     N0 = -(IMG_N/2)(cos + sin),  D0 = 1 - (IMG_N/2) sin/D + (IMG_N/2) cos/D
// and per row N0 += cos, D0 += sin/D, num = N0, U = D0, then per pixel
// num += sin, U -= cos/D. sin, cos, sin/D and cos/D are supplied per angle
// (they are known beforehand); D itself never appears.
// The accumulators are wider than the operands handed to the divider: num is
// kept as Q12.24 (36 bits), U in a 36-bit accumulator with 34 fractional
// bits and truncated to the 18-bit UQ1.17 divisor. These widths are this
// implementation's choice.
//
// Interface: start (sampled while ready) captures the four angle values.
// Timing: start edge -> N0/D0 initialised; next edge -> first row step; the
// edge after that -> first pixel at the outputs. So the first out_valid is
// three edges after start, then IMG_N*IMG_N consecutive valid cycles
// (out_last marks the final pixel); ready returns high after the last pixel.
module operand_gen
  import sprime_pkg::*;
#(
  parameter int unsigned IMG_N = 512,
  localparam int unsigned XW = $clog2(IMG_N)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic signed [TRIG_W-1:0]     sin_t,    // sin(theta), Q2.24
  input  logic signed [TRIG_W-1:0]     cos_t,    // cos(theta), Q2.24
  input  logic signed [TRIGD_W-1:0]    sin_d,    // sin(theta)/D, 34 frac bits
  input  logic signed [TRIGD_W-1:0]    cos_d,    // cos(theta)/D, 34 frac bits
  output logic                         ready,
  output logic                         out_valid,
  output logic                         out_last,
  output logic signed [DIVIDEND_W-1:0] num,
  output logic        [DIVISOR_W-1:0]  u,
  output logic        [XW-1:0]         out_x,    // pixel column index 0..IMG_N-1
  output logic        [XW-1:0]         out_y     // pixel row index 0..IMG_N-1
);

  localparam int signed HALF = IMG_N / 2;

  typedef enum logic [1:0] {S_IDLE, S_ROW0, S_RUN} state_t;
  state_t state;

  logic signed [DIVIDEND_W-1:0] s_r, c_r;      // sin, cos in numerator format
  logic signed [UACC_W-1:0]     sd_r, cd_r;    // sin/D, cos/D in U format
  logic signed [DIVIDEND_W-1:0] n0, nacc;
  logic signed [UACC_W-1:0]     d0, uacc;
  logic        [XW-1:0]         xi, yi;

  logic signed [DIVIDEND_W-1:0] s_in, c_in;
  logic signed [UACC_W-1:0]     sd_in, cd_in;
  assign s_in  = DIVIDEND_W'(sin_t);
  assign c_in  = DIVIDEND_W'(cos_t);
  assign sd_in = UACC_W'(sin_d);
  assign cd_in = UACC_W'(cos_d);

  localparam logic signed [UACC_W-1:0] ONE_U = UACC_W'(1) <<< UACC_FRAC;

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      xi        <= '0;
      yi        <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          s_r   <= s_in;
          c_r   <= c_in;
          sd_r  <= sd_in;
          cd_r  <= cd_in;
          n0    <= -(c_in * HALF) - (s_in * HALF);
          d0    <= ONE_U - (sd_in * HALF) + (cd_in * HALF);
          state <= S_ROW0;
        end
        S_ROW0: begin
          n0    <= n0 + c_r;
          d0    <= d0 + sd_r;
          xi    <= '0;
          yi    <= '0;
          state <= S_RUN;
        end
        default: begin   // S_RUN: one pixel per cycle
          nacc      <= ((yi == '0) ? n0 : nacc) + s_r;
          uacc      <= ((yi == '0) ? d0 : uacc) - cd_r;
          out_x     <= xi;
          out_y     <= yi;
          out_valid <= 1'b1;
          yi        <= yi + 1'b1;
          if (yi == XW'(IMG_N - 1)) begin
            n0 <= n0 + c_r;
            d0 <= d0 + sd_r;
            xi <= xi + 1'b1;
            if (xi == XW'(IMG_N - 1)) begin
              out_last <= 1'b1;
              state    <= S_IDLE;
            end
          end
        end
      endcase
    end
  end

  assign num = nacc;
  assign u   = uacc[UACC_FRAC -: DIVISOR_W];

endmodule
