// nor_wl_decoder: NOR-based N-bit address decoder with line enable.
//
// This is the decoder structure of a synchronous embedded SRAM: the address
// bits are captured in flip-flops (outputs A0'..A(N-1)'), a NOR plane forms
// one node ZA_i per address value, and each node is gated with the line
// enable LEN by a NAND followed by an inverter that buffers the select line
// WLS_i. For N = 2:
//   ZA0 = ~(A0' | A1')   ZA1 = ~(~A0' | A1')   ZA2 = ~(A0' | ~A1')   ZA3 = ~(~A0' | ~A1')
//   WLS_i = ~( ~(ZA_i & LEN) )
// The input of NOR i for address bit j is A_j' when bit j of i is 0 and its
// inverse when it is 1. A fault-free decoder raises exactly one WLS line
// while LEN is high and none while it is low.
//
// The same block serves as a word-line (pre)decoder and as a bit-line
// decoder. The NOR/NAND/inverter structure, the ZA equations and the default
// width of two bits follow the published 2-bit decoder; the use of an
// ordinary rising-edge clock for the address flip-flops is this design's
// choice.
//
// Timing: a is sampled on the rising edge of clk; za follows a_q; wls
// follows za and len combinationally.
module nor_wl_decoder #(
  parameter int unsigned N = 2
) (
  input  logic            clk,
  input  logic [N-1:0]    a,
  input  logic            len,
  output logic [N-1:0]    a_q,
  output logic [2**N-1:0] za,
  output logic [2**N-1:0] wls
);

  localparam int unsigned LINES = 2 ** N;

  always_ff @(posedge clk) a_q <= a;

  // NOR plane: one NOR gate per output line.
  always_comb begin
    for (int unsigned i = 0; i < LINES; i++) begin
      logic any_high;
      any_high = 1'b0;
      for (int unsigned j = 0; j < N; j++) begin
        any_high = any_high | (i[j] ? ~a_q[j] : a_q[j]);
      end
      za[i] = ~any_high;
    end
  end

  // Synchronisation NAND with LEN, then the buffering inverter.
  logic [LINES-1:0] nand_out;
  always_comb begin
    nand_out = ~(za & {LINES{len}});
    wls      = ~nand_out;
  end

endmodule
