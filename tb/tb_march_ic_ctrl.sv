// tb_march_ic_ctrl: self-checking test of the March iC- sequencer.
//
// The controller (4-bit address, 4-bit words) is connected to a simple
// memory model in the testbench that can inject one of three faults:
//   0  none
//   1  a stuck-at-0 bit in one word
//   2  a decoder open: a write to address B, when the address used before
//      B was its Hd = 1 neighbour A, also writes A (the line of A stays
//      selected after the address change)
// For every run the testbench rebuilds the full March iC- operation list on
// its own (element by element, each address of the Hd = 1 order in turn,
// the order itself rebuilt by a digit-stepping rule,
// data flipping with every new address of an element) and compares every
// issued operation with it, counts 10N operations, checks that done rises
// 10N + 1 cycles after start, and checks the verdict: pass with no fault,
// fail with the right first element and address otherwise. Runs use both
// start values v = 0 and v = 1.
module tb_march_ic_ctrl;

  localparam int unsigned AW = 4;
  localparam int unsigned DW = 4;
  localparam int unsigned N  = 2 ** AW;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          rst_n, start, v, busy, done;
  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic          fail;
  logic [15:0]   err_count;
  march_pkg::elem_e fail_elem;
  logic [AW-1:0] fail_addr;

  march_ic_ctrl #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .v(v), .busy(busy), .done(done),
    .mem_en(mem_en), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_rdata(mem_rdata), .fail(fail), .err_count(err_count),
    .fail_elem(fail_elem), .fail_addr(fail_addr)
  );

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- memory model with fault injection ----------------
  int            fault_kind;
  logic [AW-1:0] fault_a, fault_b;   // stuck word = fault_a; open: pair A -> B
  logic [DW-1:0] mem [N];
  logic [AW-1:0] rd_addr_q, cur_addr, prev_distinct, before_b;

  always_comb before_b = (mem_addr != cur_addr) ? cur_addr : prev_distinct;

  always_ff @(posedge clk) begin
    if (mem_en) begin
      rd_addr_q <= mem_addr;
      if (mem_addr != cur_addr) begin
        prev_distinct <= cur_addr;
        cur_addr      <= mem_addr;
      end
      if (mem_we) begin
        mem[mem_addr] <= mem_wdata;
        if (fault_kind == 2 && mem_addr == fault_b && before_b == fault_a)
          mem[fault_a] <= mem_wdata;
      end
    end
  end

  always_comb begin
    mem_rdata = mem[rd_addr_q];
    if (fault_kind == 1 && rd_addr_q == fault_a) mem_rdata[0] = 1'b0;
  end

  // ---------------- independent reference of March iC- ----------------
  // Element m: direction, read phase, write phase (-1: no such operation),
  // phases relative to the start value v at the first address visited.
  int dir_t [6] = '{0, 0, 0, 1, 1, 0};
  int rd_t  [6] = '{-1, 0, 1, 1, 0, 0};
  int wr_t  [6] = '{0, 1, 0, 0, 1, -1};

  typedef struct { bit we; logic [AW-1:0] a; bit d; int elem; } op_t;
  op_t ref_ops [$];

  // Hd = 1 order, built step by step: 2-bit digits start at 0 and, going
  // from i to i + 1, the digit at the position of the lowest base-4 digit
  // of i that is not 3 moves one place along the cycle 00, 01, 11, 10.
  // The k-th address of the ascending order is the one for i = k + 1
  // (wrapping), so that the order crosses every edge of every field.
  logic [AW-1:0] order [N];

  function automatic logic [1:0] cyc(int d);
    case (d % 4)
      0: return 2'b00;
      1: return 2'b01;
      2: return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  task automatic build_order();
    int d [AW/2];
    logic [AW-1:0] by_i [N];
    foreach (d[j]) d[j] = 0;
    for (int i = 0; i < N; i++) begin
      int t, r;
      for (int j = 0; j < AW / 2; j++) by_i[i][2*j +: 2] = cyc(d[j]);
      t = 0; r = i;
      while (t < AW / 2 - 1 && r % 4 == 3) begin r = r / 4; t++; end
      d[t] = (d[t] + 1) % 4;
    end
    for (int k = 0; k < N; k++) order[k] = by_i[(k + 1) % N];
  endtask

  function automatic logic [AW-1:0] hd1_addr(int k);
    return order[k];
  endfunction

  task automatic build_ref(bit vv);
    ref_ops.delete();
    for (int m = 0; m < 6; m++) begin
      for (int j = 0; j < N; j++) begin
        int k;
        bit alt;
        k   = dir_t[m] ? N - 1 - j : j;
        alt = vv ^ bit'(j % 2);
        if (rd_t[m] >= 0) ref_ops.push_back('{0, hd1_addr(k), alt ^ bit'(rd_t[m]), m});
        if (wr_t[m] >= 0) ref_ops.push_back('{1, hd1_addr(k), alt ^ bit'(wr_t[m]), m});
      end
    end
  endtask

  // Trace checker: compares every issued operation with the reference list.
  int  op_idx;
  bit  tracing;
  always @(posedge clk) begin
    if (tracing && mem_en) begin
      if (op_idx < ref_ops.size()) begin
        checks++;
        if (mem_we !== ref_ops[op_idx].we || mem_addr !== ref_ops[op_idx].a ||
            (mem_we && mem_wdata !== {DW{ref_ops[op_idx].d}})) begin
          failures++;
          $display("FAIL op %0d (M%0d): we=%0b a=%0h d=%0h expected we=%0b a=%0h d=%0b",
                   op_idx, ref_ops[op_idx].elem, mem_we, mem_addr, mem_wdata,
                   ref_ops[op_idx].we, ref_ops[op_idx].a, ref_ops[op_idx].d);
        end
      end
      op_idx++;
    end
  end

  task automatic run(bit vv, int fk, logic [AW-1:0] fa, logic [AW-1:0] fb,
                     bit exp_fail, int exp_elem, logic [AW-1:0] exp_addr);
    int cycles;
    fault_kind = fk; fault_a = fa; fault_b = fb;
    build_ref(vv);
    op_idx = 0;
    tracing = 1'b1;
    @(negedge clk);
    start = 1'b1; v = vv;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    tracing = 1'b0;
    check("operations issued (10N)", 32'(op_idx), 32'(10 * N));
    check("cycles start->done", 32'(cycles), 32'(10 * N + 1));
    check("fail", 32'(fail), 32'(exp_fail));
    if (exp_fail) begin
      check("first failing element", 32'(fail_elem), 32'(exp_elem));
      check("first failing address", 32'(fail_addr), 32'(exp_addr));
      check("error counted", 32'(err_count != 0), 32'd1);
    end else begin
      check("no errors", 32'(err_count), 32'd0);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; v = 1'b0; tracing = 1'b0; op_idx = 0;
    fault_kind = 0; fault_a = '0; fault_b = '0;
    rd_addr_q = '0; cur_addr = '0; prev_distinct = '0;
    build_order();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("idle after reset", 32'({busy, done}), 32'd0);

    run(1'b0, 0, '0, '0, 1'b0, 0, '0);
    run(1'b1, 0, '0, '0, 1'b0, 0, '0);
    // Stuck-at-0 in the fifth word of the order: v = 0 writes 0 there in M0
    // and 1 in M1, so M2's read fails there.
    run(1'b0, 1, order[4], '0, 1'b1, 2, order[4]);
    // Decoder open on the first move of the ascending order: M0's write
    // of A_vb to the second word also lands on the first, which M1 reads
    // first.
    run(1'b0, 2, order[0], order[1], 1'b1, 1, order[0]);
    run(1'b1, 2, order[0], order[1], 1'b1, 1, order[0]);
    // Decoder open on a move that only the descending order makes
    // (order[6] -> order[5]): M3's write to order[5] overwrites order[6],
    // which M4 reads first.
    run(1'b0, 2, order[6], order[5], 1'b1, 4, order[6]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 10 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
