// tb_march_ic_fault_coverage: fault coverage of the March iC- sequencer on
// the classical memory fault models.
//
// The sequencer runs on a 16-word, 1-bit-per-word behavioural memory that
// can hold one fault at a time. Every fault below is injected, on every
// cell or every ordered aggressor/victim pair, with start value v = 0 and
// v = 1, and the run must report a failure:
//   SAF   stuck-at-0 / stuck-at-1 cell
//   TF    cell that cannot make the up (0->1) or the down (1->0) transition
//   CFid  idempotent coupling <up;0> <up;1> <down;0> <down;1>: a transition
//         written into the aggressor forces the victim to a value
//   CFin  inversion coupling <up;inv> <down;inv>: the transition inverts the
//         victim
//   CFdyn dynamic coupling <r;0> <r;1> <w;0> <w;1>: any read (or write) of
//         the aggressor forces the victim to a value
//   SCF   state coupling <x;y>: while the aggressor holds x the victim is
//         forced to y (x, y in {0,1})
//   AF    address decoder faults: address a reaches cell b instead of its
//         own, or reaches both cells (a read of both returns their AND)
// The memory starts each run with random contents. Fault-free runs must
// pass. At the end the testbench prints, for each fault class, how many
// instances were injected and detected, and in which element the first
// mismatch appeared.
module tb_march_ic_fault_coverage;

  localparam int unsigned AW = 4;
  localparam int unsigned N  = 2 ** AW;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          rst_n, start, v, busy, done;
  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [0:0]    mem_wdata, mem_rdata;
  logic          fail;
  logic [15:0]   err_count;
  march_pkg::elem_e fail_elem;
  logic [AW-1:0] fail_addr;

  march_ic_ctrl #(.ADDR_W(AW), .DATA_W(1)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .v(v), .busy(busy), .done(done),
    .mem_en(mem_en), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_rdata(mem_rdata), .fail(fail), .err_count(err_count),
    .fail_elem(fail_elem), .fail_addr(fail_addr)
  );

  // ---------------- fault classes ----------------
  typedef enum int {
    F_NONE, F_SAF, F_TF, F_CFID, F_CFIN, F_CFDYN_R, F_CFDYN_W, F_SCF, F_AF_MAP, F_AF_MULTI
  } fclass_e;
  localparam int NCLASS = 10;
  string class_name [NCLASS] = '{"none", "SAF", "TF", "CFid", "CFin", "CFdyn(read)",
                                  "CFdyn(write)", "SCF", "AF(a->b)", "AF(a->a+b)"};

  fclass_e   fc;
  int        cell_a, cell_v;     // aggressor (or faulty address), victim (or other cell)
  bit        px, py;             // fault parameters (value / direction)

  bit            mem [N];

  function automatic bit raw_read(int a);
    if (fc == F_AF_MAP && a == cell_a) return mem[cell_v];
    if (fc == F_AF_MULTI && a == cell_a) return mem[cell_a] & mem[cell_v];
    return mem[a];
  endfunction

  // Apply faults that hold continuously.
  function automatic void settle();
    if (fc == F_SAF) mem[cell_a] = px;
    if (fc == F_SCF && mem[cell_a] == px) mem[cell_v] = py;
  endfunction

  task automatic do_write(int a, bit d);
    bit old;
    if (fc == F_AF_MAP && a == cell_a) a = cell_v;
    if (fc == F_AF_MULTI && a == cell_a) mem[cell_v] = d;
    old = mem[a];
    if (fc == F_TF && a == cell_a && old == !px && d == px) d = old;  // px: 1 = up blocked
    mem[a] = d;
    if (a == cell_a && old != d) begin
      // transition written into the aggressor: px = 1 for up, 0 for down
      if (fc == F_CFID && d == px) mem[cell_v] = py;
      if (fc == F_CFIN && d == px) mem[cell_v] = !mem[cell_v];
    end
    if (fc == F_CFDYN_W && a == cell_a) mem[cell_v] = py;
    settle();
  endtask

  always @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) do_write(int'(mem_addr), mem_wdata[0]);
      else if (fc == F_CFDYN_R && int'(mem_addr) == cell_a) begin
        // the read of the aggressor disturbs the victim after its data is out
        mem[cell_v] = py;
        settle();
      end
    end
  end

  // The read port presents the word addressed in the previous cycle, as
  // the state of the array was right after the read was issued.
  bit rd_val;
  always @(posedge clk) if (mem_en && !mem_we) rd_val <= raw_read(int'(mem_addr));
  assign mem_rdata[0] = rd_val;

  // ---------------- bookkeeping ----------------
  int injected [NCLASS];
  int detected [NCLASS];
  int first_elem [NCLASS][6];

  task automatic run_one(fclass_e c, int a, int b, bit x, bit y, bit vv);
    fc = c; cell_a = a; cell_v = b; px = x; py = y;
    foreach (mem[i]) mem[i] = bit'($urandom);
    settle();
    @(negedge clk);
    start = 1'b1; v = vv;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    injected[c]++;
    checks++;
    if (c == F_NONE) begin
      if (fail) begin
        failures++;
        $display("FAIL fault-free run reported an error (v=%0b)", vv);
      end
    end else if (fail) begin
      detected[c]++;
      first_elem[c][fail_elem]++;
    end else begin
      failures++;
      $display("FAIL %s a=%0d b=%0d x=%0b y=%0b v=%0b not detected",
               class_name[c], a, b, x, y, vv);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; v = 1'b0; fc = F_NONE;
    cell_a = 0; cell_v = 0; px = 0; py = 0; rd_val = 1'b0;
    foreach (injected[i]) begin
      injected[i] = 0; detected[i] = 0;
      for (int e = 0; e < 6; e++) first_elem[i][e] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int vi = 0; vi < 2; vi++) begin
      bit vv;
      vv = bit'(vi);
      run_one(F_NONE, 0, 0, 0, 0, vv);
      run_one(F_NONE, 0, 0, 0, 0, vv);
      for (int a = 0; a < N; a++) begin
        for (int x = 0; x < 2; x++) begin
          run_one(F_SAF, a, 0, bit'(x), 0, vv);
          run_one(F_TF,  a, 0, bit'(x), 0, vv);
        end
        for (int b = 0; b < N; b++) begin
          if (a == b) continue;
          for (int x = 0; x < 2; x++) begin
            run_one(F_CFIN, a, b, bit'(x), 0, vv);
            for (int y = 0; y < 2; y++) begin
              run_one(F_CFID,    a, b, bit'(x), bit'(y), vv);
              run_one(F_SCF,     a, b, bit'(x), bit'(y), vv);
            end
            run_one(F_CFDYN_R, a, b, 0, bit'(x), vv);
            run_one(F_CFDYN_W, a, b, 0, bit'(x), vv);
          end
          run_one(F_AF_MAP,   a, b, 0, 0, vv);
          run_one(F_AF_MULTI, a, b, 0, 0, vv);
        end
      end
    end

    for (int c = 1; c < NCLASS; c++) begin
      $display("%-13s injected %5d detected %5d   first failing element M0..M5: %0d %0d %0d %0d %0d %0d",
               class_name[c], injected[c], detected[c], first_elem[c][0], first_elem[c][1],
               first_elem[c][2], first_elem[c][3], first_elem[c][4], first_elem[c][5]);
      checks++;
      if (injected[c] == 0) begin
        failures++;
        $display("FAIL no %s fault injected", class_name[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000 * (10 * N + 4)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
