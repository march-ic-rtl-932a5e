// tb_march_ic_top: end-to-end test of the March iC- BIST with its SRAM, at
// the default size (8-bit address, 256 words of 8 bits).
//
// Decoder open faults are injected by overriding one NOR node (ZA0) of a
// predecoder with a switch-level model of that node: it is pulled up when
// all its inputs are low, pulled down when an input whose transistor is
// intact is high, and otherwise keeps its charge. An open (non-resistive)
// defect keeps the charge for as long as no other path discharges it; a
// resistive defect only delays the discharge, modelled as one extra cycle.
// Runs (the ascending address order starts 01, 03, 02, 06, 04, 05, ...
// and ends at 00; the descending one starts 00, 80, 82, ...):
//   1-2  fault-free memory, v = 0 and v = 1: the test must pass;
//   3    open pull-down on input A0 of ZA0 in the bit-line decoder (lowest
//        field), v = 0: the ascending move 04 -> 05 (A0 rises) leaves word
//        04 selected while M0 writes word 05, so M1 must fail at word 04;
//   4    the same defect with v = 1: the move 00 -> 01 from the end of M0
//        to the start of M1 also keeps word 00 selected, so M1's first
//        read (word 01) sees words 00 and 01 with opposite data. The
//        memory model resolves that to 0, which is wrong for v = 1, so the
//        first mismatch is reported at word 01;
//   5    resistive open on input A0 of ZA0 in the second field: the move
//        from word 02 to word 06 keeps word 02 selected for one cycle,
//        during M0's write to word 06, so M1 must fail at word 02;
//   6    open pull-down on input A1 of ZA0 in the bit-line decoder (the
//        move <A0,A1> = <0,0> -> <0,1>): only the descending order makes
//        it. In M3 the move 04 -> 06 charges the node and it stays charged
//        through the move 06 -> 02 (another field changes), so M3's write
//        to 02 also lands on 00; M4 reads 00 first and must fail there.
// Every run checks that done rises 10N + 1 cycles after start. The test
// also counts how often each mechanism occurred (each element, both
// address directions, double word selection during a write, a read that
// selects two words holding equal data, fault detection) and fails if one
// never did.
module tb_march_ic_top;

  localparam int unsigned AW = 8;
  localparam int unsigned N  = 2 ** AW;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          rst_n, start, v, busy, done, fail;
  logic [15:0]   err_count;
  logic [2:0]    fail_elem;
  logic [AW-1:0] fail_addr;

  march_ic_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .v(v), .busy(busy), .done(done),
    .fail(fail), .err_count(err_count), .fail_elem(fail_elem), .fail_addr(fail_addr)
  );

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- switch-level model of a defective ZA0 node -----------
  // mode 0: intact, 1: open, 2: resistive open (one cycle late discharge)
  int         mode;
  int         open_in;            // input (0: A0', 1: A1') whose pull-down is open
  logic [1:0] aq, aq_prev;
  logic       zn;                 // charge on the defective node
  logic [3:0] za_model;

  task automatic update_node();
    logic others;
    others = |(aq & ~(2'b01 << open_in));
    if (aq == 2'b00)        zn = 1'b1;   // pull-up path conducts
    else if (others)        zn = 1'b0;   // intact pull-down conducts
    else if (mode == 2 && aq == aq_prev) zn = 1'b0;  // late discharge done
    // otherwise the node keeps its charge
  endtask

  always_comb begin
    za_model    = 4'b0001 << aq;
    za_model[0] = zn;
  end

  int fault_field;
  always @(posedge clk) begin
    #1;
    aq_prev = aq;
    aq = (fault_field == 0) ? dut.u_sram.g_field[0].u_dec.a_q
                            : dut.u_sram.g_field[1].u_dec.a_q;
    update_node();
  end

  // ---------------- mechanism counters ----------------
  int elem_cycles [6];
  int up_cycles, down_cycles, double_writes, double_equal_reads, detections;

  always @(posedge clk) begin
    if (dut.u_ctrl.busy && dut.mem_en) begin
      elem_cycles[dut.u_ctrl.elem]++;
      if (dut.u_ctrl.cur.down) down_cycles++;
      else                     up_cycles++;
    end
    if (dut.u_sram.en_q && $countones(dut.u_sram.word_sel) > 1) begin
      if (dut.u_sram.we_q) double_writes++;
      else begin
        // a read selecting several words: do they all hold the same data?
        logic [7:0] first;
        bit         same, got_first;
        same = 1'b1; got_first = 1'b0; first = '0;
        for (int w = 0; w < N; w++) begin
          if (dut.u_sram.word_sel[w]) begin
            if (!got_first) begin first = dut.u_sram.mem[w]; got_first = 1'b1; end
            else if (dut.u_sram.mem[w] != first) same = 1'b0;
          end
        end
        if (same) double_equal_reads++;
      end
    end
  end

  task automatic run(string name, bit vv, int md, int field, int oin,
                     bit exp_fail, int exp_elem, int exp_addr);
    int cycles;
    mode = md; fault_field = field; open_in = oin;
    aq = 2'b00; aq_prev = 2'b00; zn = 1'b1;
    if (md != 0) begin
      if (field == 0) force dut.u_sram.g_field[0].u_dec.za = za_model;
      else            force dut.u_sram.g_field[1].u_dec.za = za_model;
    end
    @(negedge clk);
    start = 1'b1; v = vv;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    if (md != 0) begin
      if (field == 0) release dut.u_sram.g_field[0].u_dec.za;
      else            release dut.u_sram.g_field[1].u_dec.za;
    end
    $display("%s: fail=%0b errors=%0d first M%0d @%0h, %0d cycles",
             name, fail, err_count, fail_elem, fail_addr, cycles);
    check({name, ": cycles"}, 32'(cycles), 32'(10 * N + 1));
    check({name, ": fail"}, 32'(fail), 32'(exp_fail));
    if (exp_fail) begin
      detections++;
      check({name, ": element"}, 32'(fail_elem), 32'(exp_elem));
      check({name, ": address"}, 32'(fail_addr), 32'(exp_addr));
    end else begin
      check({name, ": errors"}, 32'(err_count), 32'd0);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; v = 1'b0;
    mode = 0; fault_field = 0; open_in = 0; aq = '0; aq_prev = '0; zn = 1'b1;
    up_cycles = 0; down_cycles = 0; double_writes = 0; double_equal_reads = 0;
    detections = 0;
    foreach (elem_cycles[i]) elem_cycles[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    run("fault-free v=0",          1'b0, 0, 0, 0, 1'b0, 0, 0);
    run("fault-free v=1",          1'b1, 0, 0, 0, 1'b0, 0, 0);
    run("open A0 field 0 v=0",     1'b0, 1, 0, 0, 1'b1, 1, 'h04);
    run("open A0 field 0 v=1",     1'b1, 1, 0, 0, 1'b1, 1, 'h01);
    run("resistive A0 field 1",    1'b0, 2, 1, 0, 1'b1, 1, 'h02);
    run("open A1 field 0",         1'b0, 1, 0, 1, 1'b1, 4, 'h00);

    for (int e = 0; e < 6; e++) begin
      $display("element M%0d: %0d operations", e, elem_cycles[e]);
      check("element ran", 32'(elem_cycles[e] > 0), 32'd1);
    end
    $display("ascending %0d, descending %0d, double writes %0d, double equal reads %0d, detections %0d",
             up_cycles, down_cycles, double_writes, double_equal_reads, detections);
    check("ascending order used",  32'(up_cycles > 0), 32'd1);
    check("descending order used", 32'(down_cycles > 0), 32'd1);
    check("double selection during a write", 32'(double_writes > 0), 32'd1);
    check("double read with equal data", 32'(double_equal_reads > 0), 32'd1);
    check("fault detected", 32'(detections > 0), 32'd1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * (10 * N + 10)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
