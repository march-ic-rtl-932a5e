// sram_core: synchronous single-port SRAM with a predecoded NOR address
// decoder, the memory that the March iC- test runs on.
//
// The ADDR_W address bits are cut into ADDR_W/PRE_W fields of PRE_W bits.
// Each field drives its own nor_wl_decoder, which registers the field and
// produces 2**PRE_W one-hot select lines gated by the line enable. The
// lowest field plays the bit-line (column) decoder, the others the word-line
// predecoders; a post-decoder ANDs one line of every field to select a cell
// (here a DATA_W-bit word). The decoding is not collapsed into a plain
// array index on purpose: a decoder that selects two lines of a field at
// once (an open defect in its NOR plane) selects two words, and the array
// then writes both and reads both, which is the behaviour the March iC-
// test is built to catch.
//
// Array behaviour when several words are selected: a write stores the data
// into every selected word; a read returns the bitwise AND of the selected
// words (a stored 0 discharges the shared bit line), and all ones when no
// word is selected (precharged bit lines). On silicon two opposite values
// on one bit line give an undefined level; this two-valued model resolves
// it to 0. The field width of two bits follows the published decoder; the
// field split, array size, word width and read resolution are this
// design's choices.
//
// Timing: addr, we, wdata and en are sampled on a rising edge (cycle t).
// During cycle t+1 the select lines are active (line enable = registered
// en), rdata shows the selected word(s) combinationally, and a write takes
// effect on the rising edge that ends cycle t+1. Read latency is one cycle;
// a read issued right after a write to the same word sees the new data.
// The array is not reset. The registered address and NOR node outputs of
// each predecoder are left unconnected here; they stay visible in the
// hierarchy for observing or overriding the decoder nodes in simulation.
module sram_core #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned PRE_W  = 2
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned FIELDS = ADDR_W / PRE_W;
  localparam int unsigned LINES  = 2 ** PRE_W;
  localparam int unsigned WORDS  = 2 ** ADDR_W;

  initial begin
    assert (ADDR_W % PRE_W == 0)
      else $fatal(1, "sram_core: ADDR_W must be a multiple of PRE_W");
  end

  logic              en_q;   // line enable (WLEN) for the current cycle
  logic              we_q;
  logic [DATA_W-1:0] wdata_q;

  always_ff @(posedge clk) begin
    en_q    <= en;
    we_q    <= we;
    wdata_q <= wdata;
  end

  // Predecoders: one NOR decoder per address field.
  logic [FIELDS-1:0][LINES-1:0] field_sel;

  for (genvar f = 0; f < FIELDS; f++) begin : g_field
    logic [PRE_W-1:0] field_a_q;
    logic [LINES-1:0] za;
    nor_wl_decoder #(.N(PRE_W)) u_dec (
      .clk (clk),
      .a   (addr[f*PRE_W +: PRE_W]),
      .len (en_q),
      .a_q (field_a_q),
      .za  (za),
      .wls (field_sel[f])
    );
  end

  // Post-decoder: a word is selected when its line is active in every field.
  logic [WORDS-1:0] word_sel;
  always_comb begin
    for (int unsigned w = 0; w < WORDS; w++) begin
      logic s;
      s = 1'b1;
      for (int unsigned f = 0; f < FIELDS; f++) begin
        s = s & field_sel[f][(w >> (f * PRE_W)) % LINES];
      end
      word_sel[w] = s;
    end
  end

  // Cell array.
  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we_q) begin
      for (int unsigned w = 0; w < WORDS; w++) begin
        if (word_sel[w]) mem[w] <= wdata_q;
      end
    end
  end

  always_comb begin
    rdata = '1;
    for (int unsigned w = 0; w < WORDS; w++) begin
      if (word_sel[w]) rdata = rdata & mem[w];
    end
  end

endmodule
