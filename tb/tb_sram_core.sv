// tb_sram_core: self-checking test of the predecoded SRAM.
//
// Part 1: writes random words to every address in random order (checked
// against a reference array kept in the testbench), reads every address
// back with the one-cycle read latency, and checks a read issued right
// after a write to the same word, and that en low leaves the array alone.
// Part 2: forces two NOR nodes of the bit-line decoder (lowest address
// field) high at once, as an open defect in its NOR plane would, and checks
// that a write then lands in both words and that a read returns the AND of
// the two words.
module tb_sram_core;

  localparam int unsigned AW = 8;
  localparam int unsigned DW = 8;
  localparam int unsigned N  = 2 ** AW;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          en, we;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;

  sram_core dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  logic [DW-1:0] ref_mem [N];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Issue one operation in the current cycle (called right after a negedge).
  task automatic op(logic w, logic [AW-1:0] a, logic [DW-1:0] d);
    en = 1'b1; we = w; addr = a; wdata = d;
    @(negedge clk);
    en = 1'b0; we = 1'b0;
  endtask

  initial begin
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    @(negedge clk);
    // Write every word, visiting the addresses in a scrambled order.
    for (int i = 0; i < N; i++) begin
      logic [AW-1:0] a;
      logic [DW-1:0] d;
      a = AW'((i * 37 + 11) % N);
      d = DW'($urandom);
      ref_mem[a] = d;
      op(1'b1, a, d);
    end
    // Read everything back; data is visible in the cycle after the issue.
    for (int i = 0; i < N; i++) begin
      op(1'b0, AW'(i), '0);
      check("read back", 32'(rdata), 32'(ref_mem[i]));
    end
    // Write then immediately read the same word.
    op(1'b1, AW'(5), 8'hA5);
    op(1'b0, AW'(5), '0);
    check("read after write", 32'(rdata), 32'hA5);
    ref_mem[5] = 8'hA5;
    // With en low nothing is written.
    en = 1'b0; we = 1'b1; addr = AW'(6); wdata = ~ref_mem[6];
    @(negedge clk);
    @(negedge clk);
    we = 1'b0;
    op(1'b0, AW'(6), '0);
    check("no write without en", 32'(rdata), 32'(ref_mem[6]));

    // Double selection in the bit-line decoder: lines 0 and 1 of field 0.
    op(1'b1, AW'(8'h40), 8'h0F);
    op(1'b1, AW'(8'h41), 8'h3C);
    @(negedge clk);  // let the last write complete
    force dut.g_field[0].u_dec.za = 4'b0011;
    op(1'b0, AW'(8'h40), '0);
    check("double read is AND", 32'(rdata), 32'(8'h0F & 8'h3C));
    op(1'b1, AW'(8'h40), 8'h99);
    @(negedge clk);  // the write completes on this edge
    release dut.g_field[0].u_dec.za;
    op(1'b0, AW'(8'h40), '0);
    check("double write word 0x40", 32'(rdata), 32'h99);
    op(1'b0, AW'(8'h41), '0);
    check("double write word 0x41", 32'(rdata), 32'h99);
    op(1'b0, AW'(8'h42), '0);
    check("neighbour untouched", 32'(rdata), 32'(ref_mem[8'h42]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
