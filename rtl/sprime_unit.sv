// sprime_unit: pipelined evaluation of the fan-beam back-projection
// coordinate s' for every pixel of one projection.
//
// In fan-beam filtered back-projection each pixel (x, y) of the image must be
// projected, for every source angle theta, onto the linear detector array:
//     s' = (x cos + y sin) / U,   U = 1 + (x sin - y cos) / D,
// D being the source-to-rotation-centre distance. The division is the costly
// part of the back-projection; this unit produces one s' per clock cycle.
// It chains
//   operand_gen  - numerator and U by accumulation (no multipliers),
//   srt_divider  - divisor normalization, 9 two-cycle radix-4 SRT stages
//                  with table-driven quotient selection and on-the-fly
//                  conversion, and a result register.
// The filtered projections, their interpolation and the image accumulation
// are outside this unit; the pixel indices travel with each result so that a
// back-projector can use them.
//
// Interface: present sin, cos, sin/D and cos/D of an angle with start while
// ready is high. Outputs: sp_valid, sprime (signed, 6 fractional bits,
// detector-element units), sp_x/sp_y (pixel indices 0..IMG_N-1, x outer
// loop), sp_last on the final pixel and sp_range_err if U fell below 0.25.
// Timing: the first s' leaves 23 cycles after the start edge (3 in the
// generator, 1 normalization, 2 per stage, 1 result register), then one per
// cycle for IMG_N*IMG_N cycles.
module sprime_unit
  import sprime_pkg::*;
#(
  parameter int unsigned IMG_N = 512,
  parameter int unsigned N_ST  = N_STAGES,
  localparam int unsigned XW = $clog2(IMG_N)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic signed [TRIG_W-1:0]  sin_t,
  input  logic signed [TRIG_W-1:0]  cos_t,
  input  logic signed [TRIGD_W-1:0] sin_d,
  input  logic signed [TRIGD_W-1:0] cos_d,
  output logic                      ready,
  output logic                      sp_valid,
  output logic signed [QUOT_W-1:0]  sprime,
  output logic        [XW-1:0]      sp_x,
  output logic        [XW-1:0]      sp_y,
  output logic                      sp_last,
  output logic                      sp_range_err
);

  localparam int unsigned TAG_W = 2 * XW + 1;

  logic                         g_valid, g_last;
  logic signed [DIVIDEND_W-1:0] g_num;
  logic        [DIVISOR_W-1:0]  g_u;
  logic        [XW-1:0]         g_x, g_y;
  logic        [TAG_W-1:0]      d_tag;

  operand_gen #(.IMG_N(IMG_N)) u_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .sin_t     (sin_t),
    .cos_t     (cos_t),
    .sin_d     (sin_d),
    .cos_d     (cos_d),
    .ready     (ready),
    .out_valid (g_valid),
    .out_last  (g_last),
    .num       (g_num),
    .u         (g_u),
    .out_x     (g_x),
    .out_y     (g_y)
  );

  srt_divider #(.N_ST(N_ST), .TAG_W(TAG_W)) u_div (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (g_valid),
    .dividend      (g_num),
    .divisor       (g_u),
    .in_tag        ({g_last, g_x, g_y}),
    .out_valid     (sp_valid),
    .quotient      (sprime),
    .out_range_err (sp_range_err),
    .out_tag       (d_tag)
  );

  assign {sp_last, sp_x, sp_y} = d_tag;

endmodule
