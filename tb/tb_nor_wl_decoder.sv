// tb_nor_wl_decoder: self-checking test of the NOR word-line decoder.
//
// Drives every address of a 2-bit and a 3-bit decoder with the line enable
// high and low, and after each clock edge checks the registered address,
// every NOR node (ZA_i high exactly when the registered address equals i)
// and every select line (ZA_i and LEN). Also walks the 2-bit sequence
// <A0,A1> = <0,0> then <0,1> and checks that WLS0 drops and WLS2 rises.
module tb_nor_wl_decoder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [1:0] a2;
  logic       len2;
  logic [1:0] a2_q;
  logic [3:0] za2, wls2;

  logic [2:0] a3;
  logic       len3;
  logic [2:0] a3_q;
  logic [7:0] za3, wls3;

  nor_wl_decoder #(.N(2)) dut2 (.clk(clk), .a(a2), .len(len2), .a_q(a2_q), .za(za2), .wls(wls2));
  nor_wl_decoder #(.N(3)) dut3 (.clk(clk), .a(a3), .len(len3), .a_q(a3_q), .za(za3), .wls(wls3));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    a2 = '0; len2 = 1'b0; a3 = '0; len3 = 1'b0;
    @(negedge clk);
    for (int l = 0; l < 2; l++) begin
      for (int a = 0; a < 8; a++) begin
        a2 = 2'(a); a3 = 3'(a); len2 = l[0]; len3 = l[0];
        @(posedge clk); #1;
        check("a2_q", 32'(a2_q), 32'(a % 4));
        check("za2",  32'(za2),  32'(1 << (a % 4)));
        check("wls2", 32'(wls2), (l != 0) ? 32'(1 << (a % 4)) : 32'd0);
        check("a3_q", 32'(a3_q), 32'(a));
        check("za3",  32'(za3),  32'(1 << a));
        check("wls3", 32'(wls3), (l != 0) ? 32'(1 << a) : 32'd0);
        @(negedge clk);
      end
    end
    // <A0,A1> = <0,0> -> <0,1>: WLS0 then WLS2 (A0 is bit 0).
    len2 = 1'b1;
    a2 = 2'b00; @(posedge clk); #1;
    check("WLS0 active", 32'(wls2[0]), 32'd1);
    @(negedge clk);
    a2 = 2'b10; #1;
    check("WLS0 held before edge", 32'(wls2[0]), 32'd1);
    @(posedge clk); #1;
    check("WLS0 released", 32'(wls2[0]), 32'd0);
    check("WLS2 active", 32'(wls2[2]), 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
