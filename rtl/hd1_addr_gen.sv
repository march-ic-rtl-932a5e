// hd1_addr_gen: address sequencer with Hamming distance 1 between
// consecutive addresses, covering every single-bit transition of each
// 2-bit decoder field.
//
// March iC- needs every address exactly once per March element, in an order
// where each address differs from the previous one in a single bit (Hd = 1),
// and the exact reverse of that order for the descending elements. To
// sensitise every open in a decoder field, the order should also make every
// single-bit transition of every field. An open on the line of value a,
// reached by the move a -> b, is sensitised by the ascending order if it
// contains a -> b, or by the descending order if the ascending order
// contains b -> a, so each edge of the field's n-cube must be crossed at
// least once.
//
// The address is cut into FIELD_W-bit fields that match the decoder fields.
// An index k runs over 0 .. 2**ADDR_W - 1 and i = k + 1 (mod 2**ADDR_W) is
// written as digits b_j of FIELD_W bits. The modular Gray code
// d_j = b_j - b_(j+1) (mod 2**FIELD_W) changes exactly one digit, by +-1,
// at every step, and is cyclic: after the last index it returns to the
// first value by a move of the top digit. Each field of the address is the
// reflected Gray code of its digit, so a +-1 move (3 <-> 0 included) flips
// one address bit. Every digit below the top one wraps many times and so
// crosses all 2**FIELD_W edges of its cycle; the offset of one index makes
// the single cycle edge the path leaves out a move of digit 0, so the top
// digit also crosses all of its edges. For FIELD_W = 2 the cycle 00, 01, 11,
// 10 is the whole 2-cube, so every transition of every 2-bit field is made.
// For wider fields the order is still Hd = 1 but covers only the edges of
// the field's Gray cycle. With FIELD_W = 1 the order is the plain Gray code.
//
// The modular Gray construction is this design's choice of Hd = 1
// generator. Each step flips one address bit, so the address weight parity
// alternates with k; the alternating data of March iC- uses k_lsb.
//
// Interface: init loads the first index of the order selected by down
// (0 up, 2**ADDR_W - 1 down) and stores that direction; step moves one
// place in the stored order. last is high on the final address of the
// order. Both act on the rising edge of clk; addr, k_lsb and last follow
// the registered index and direction, so none of them depends
// combinationally on init, step or down.
module hd1_addr_gen #(
  parameter int unsigned ADDR_W  = 8,
  parameter int unsigned FIELD_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              step,
  input  logic              down,
  output logic [ADDR_W-1:0] addr,
  output logic              k_lsb,
  output logic              last
);

  logic [ADDR_W-1:0] k;
  logic              down_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= '0;
      down_q <= 1'b0;
    end else if (init) begin
      k      <= down ? '1 : '0;
      down_q <= down;
    end else if (step) begin
      k <= down_q ? k - 1'b1 : k + 1'b1;
    end
  end

  localparam int unsigned FIELDS = ADDR_W / FIELD_W;

  initial begin
    assert (ADDR_W % FIELD_W == 0)
      else $fatal(1, "hd1_addr_gen: ADDR_W must be a multiple of FIELD_W");
  end

  // k + 1 (wrapping), with one zero digit above the top one
  logic [ADDR_W+FIELD_W-1:0] idx;
  logic [FIELD_W-1:0]        digit;

  always_comb begin
    idx = {{FIELD_W{1'b0}}, k + 1'b1};
    for (int unsigned j = 0; j < FIELDS; j++) begin
      digit = idx[j*FIELD_W +: FIELD_W] - idx[(j+1)*FIELD_W +: FIELD_W];
      addr[j*FIELD_W +: FIELD_W] = digit ^ (digit >> 1);
    end
    k_lsb = k[0];
    last  = down_q ? (k == '0) : (k == '1);
  end

  // Every step must change exactly one address bit.
  logic [ADDR_W-1:0] addr_prev;
  logic              stepped;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_prev <= '0;
      stepped   <= 1'b0;
    end else begin
      addr_prev <= addr;
      stepped   <= step && !init && !last;
    end
  end

  always_ff @(posedge clk) begin
    if (stepped) begin
      assert ($onehot(addr ^ addr_prev))
        else $error("hd1_addr_gen: consecutive addresses differ in more than one bit");
    end
  end

endmodule
