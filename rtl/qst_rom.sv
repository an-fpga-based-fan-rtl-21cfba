// qst_rom: quotient selection table of one radix-4 SRT stage.
//
// A 512 x 4 read-only memory, the size of one FPGA embedded array block in
// its 512 x 4 configuration, which is how the selection function is mapped in
// the design. The 9-bit address is the 6-bit truncated estimate of the
// shifted partial remainder 4w (3 integer bits, 3 fractional bits, two's
// complement) followed by the 3 divisor bits after the leading one. The word
// read is the quotient digit in {-2..2} coded as sign plus one-hot magnitude
// (sprime_pkg::qdigit_t), so all four bits of the word are used and drive the
// divisor-multiple multiplexer with no decoder; this coding is an
// implementation choice, the design states only that 3 bits would suffice and
// that all 4 are used.
//
// Contents: entry {Y, k} holds the digit q whose selection interval
// [(q-2/3)d, (q+2/3)d] contains every 4w in [Y/8, (Y+1)/8) for every divisor
// d in [(8+k)/16, (9+k)/16) (see sprime_pkg::qsel).
//
// Timing: synchronous read, the word for the address sampled at a rising
// clock edge is at q after that edge (one cycle, the quotient-selection cycle
// of the stage).
module qst_rom
  import sprime_pkg::*;
(
  input  logic                  clk,
  input  logic [QST_ADDR_W-1:0] addr,   // {y_est[5:0], d_est[2:0]}
  output qdigit_t               q
);

  localparam int unsigned DEPTH = 1 << QST_ADDR_W;

  logic [QST_DATA_W-1:0] rom [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      rom[a] = qsel(Y_EST_W'(a >> D_EST_W), D_EST_W'(a));
    end
  end

  always_ff @(posedge clk) begin
    q <= qdigit_t'(rom[addr]);
  end

endmodule
