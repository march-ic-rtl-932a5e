// tb_hd1_addr_gen: self-checking test of the Hd = 1 address sequencer.
//
// For the default generator (8-bit address, 2-bit fields): walks the
// ascending order and checks that it visits every address exactly once,
// that consecutive addresses differ in exactly one bit, that k_lsb
// alternates together with the parity of the address weight, and that last
// is high on the final address only. It records which single-bit
// transitions each 2-bit field makes and checks that all four edges of
// every field's square (00-01, 01-11, 11-10, 10-00) are crossed. Then walks
// the descending order and checks that it is the exact reverse of the
// ascending one.
module tb_hd1_addr_gen;

  localparam int unsigned AW = 8;
  localparam int unsigned N  = 2 ** AW;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          rst_n, init, step, down;
  logic [AW-1:0] addr;
  logic          k_lsb, last;

  hd1_addr_gen dut (
    .clk(clk), .rst_n(rst_n), .init(init), .step(step), .down(down),
    .addr(addr), .k_lsb(k_lsb), .last(last)
  );

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  localparam int unsigned FIELDS = AW / 2;

  logic [AW-1:0] up_seq [N];
  bit            seen   [N];
  bit            edge_seen [FIELDS][4][4];
  bit            par0;

  initial begin
    rst_n = 1'b0; init = 1'b0; step = 1'b0; down = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Ascending order.
    init = 1'b1; down = 1'b0;
    @(negedge clk);
    init = 1'b0;
    for (int i = 0; i < N; i++) begin
      up_seq[i] = addr;
      if (i == 0) begin
        par0 = bit'(k_lsb) ^ bit'($countones(addr) % 2);
      end else begin
        check("Hd=1 up", 32'($countones(addr ^ up_seq[i-1])), 32'd1);
        for (int f = 0; f < FIELDS; f++) begin
          int a, b;
          a = (up_seq[i-1] >> (2 * f)) & 3;
          b = (addr >> (2 * f)) & 3;
          if (a != b) begin
            edge_seen[f][a][b] = 1'b1;
            edge_seen[f][b][a] = 1'b1;
          end
        end
      end
      check("unique up", 32'(seen[addr]), 32'd0);
      seen[addr] = 1'b1;
      check("parity alternates with k", 32'(bit'(k_lsb) ^ bit'($countones(addr) % 2)), 32'(par0));
      check("last up", 32'(last), 32'(i == N - 1));
      step = (i != N - 1);
      @(negedge clk);
      step = 1'b0;
    end
    for (int f = 0; f < FIELDS; f++) begin
      check("edge 00-01", 32'(edge_seen[f][0][1]), 32'd1);
      check("edge 01-11", 32'(edge_seen[f][1][3]), 32'd1);
      check("edge 11-10", 32'(edge_seen[f][3][2]), 32'd1);
      check("edge 10-00", 32'(edge_seen[f][2][0]), 32'd1);
    end
    // Descending order.
    init = 1'b1; down = 1'b1;
    @(negedge clk);
    init = 1'b0; down = 1'b0;  // direction is held internally
    for (int i = N - 1; i >= 0; i--) begin
      check("reverse", 32'(addr), 32'(up_seq[i]));
      check("last down", 32'(last), 32'(i == 0));
      step = (i != 0);
      @(negedge clk);
      step = 1'b0;
    end
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
