// march_ic_ctrl: March iC- test sequencer and response checker.
//
// Runs the six March iC- elements (see march_pkg) over a memory of
// 2**ADDR_W words, one memory operation per clock cycle, so a complete run
// issues 10 * 2**ADDR_W operations. Addresses come from hd1_addr_gen (Hd = 1
// order and its reverse; FIELD_W should equal the memory's decoder field
// width so that every transition of every field is made). Data are alternating: the bit for an operation is
// v ^ phase ^ down ^ k[0] (k = up-order index of the address), replicated
// over the DATA_W bits of the word. Each read is compared one cycle later
// with the value it should return; a mismatch counts an error and the first
// one is recorded with its element and address.
//
// The element structure, address order and alternating data follow the
// March iC- definition. The read-before-write order inside an element, the
// one-operation-per-cycle schedule, the solid replication of the data bit
// over a word and the error reporting are this design's choices.
//
// Interface:
//   start (pulse, accepted when not busy) with v = start value of A_v;
//   busy is high from the cycle after start until done rises; done stays
//   high until the next start. Memory port: mem_en/mem_we/mem_addr/mem_wdata
//   are valid in the cycle an operation is issued, mem_rdata is expected
//   one cycle after a read is issued (sram_core timing).
//   err_count saturates; fail is high if any read mismatched.
// Timing: done rises 10 * 2**ADDR_W + 1 cycles after the edge that accepts
// start (10N issue cycles plus one cycle for the last comparison).
module march_ic_ctrl
  import march_pkg::*;
#(
  parameter int unsigned ADDR_W  = 8,
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned FIELD_W = 2,
  parameter int unsigned CNT_W   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              v,
  output logic              busy,
  output logic              done,
  // memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // result
  output logic              fail,
  output logic [CNT_W-1:0]  err_count,
  output elem_e             fail_elem,
  output logic [ADDR_W-1:0] fail_addr
);

  typedef enum logic [1:0] {
    ST_IDLE,
    ST_RUN,
    ST_FLUSH,
    ST_DONE
  } state_e;

  state_e state;
  elem_e  elem;
  logic   op_second;  // 0: first operation of the element, 1: second
  logic   v_q;

  elem_t  cur;
  logic   last_elem;
  logic   nxt_down;

  always_comb begin
    cur       = elem_desc(elem);
    last_elem = (elem == ELEM_M5);
    nxt_down  = elem_desc(last_elem ? ELEM_M0 : elem_e'(elem + 3'd1)).down;
  end

  // Address generator control.
  logic              ag_init, ag_step, ag_down;
  logic [ADDR_W-1:0] ag_addr;
  logic              ag_k_lsb, ag_last;

  hd1_addr_gen #(.ADDR_W(ADDR_W), .FIELD_W(FIELD_W)) u_addr_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .init  (ag_init),
    .step  (ag_step),
    .down  (ag_down),
    .addr  (ag_addr),
    .k_lsb (ag_k_lsb),
    .last  (ag_last)
  );

  logic start_ok;
  logic is_read;
  logic elem_end;   // this cycle issues the last operation at this address
  logic wr_bit, rd_bit;

  always_comb begin
    start_ok = start && (state == ST_IDLE || state == ST_DONE);
    is_read  = cur.has_read && !op_second;
    elem_end = !(is_read && cur.has_write);
    wr_bit   = alt_bit(v_q, cur.wr_phase, cur.down, ag_k_lsb);
    rd_bit   = alt_bit(v_q, cur.rd_phase, cur.down, ag_k_lsb);

    ag_init = start_ok || (state == ST_RUN && elem_end && ag_last && !last_elem);
    ag_step = (state == ST_RUN) && elem_end && !ag_last;
    ag_down = start_ok ? 1'b0 : nxt_down;

    mem_en    = (state == ST_RUN);
    mem_we    = (state == ST_RUN) && !is_read;
    mem_addr  = ag_addr;
    mem_wdata = {DATA_W{wr_bit}};

    busy = (state == ST_RUN) || (state == ST_FLUSH);
    done = (state == ST_DONE);
  end

  // Sequencing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      elem      <= ELEM_M0;
      op_second <= 1'b0;
      v_q       <= 1'b0;
    end else if (start_ok) begin
      state     <= ST_RUN;
      elem      <= ELEM_M0;
      op_second <= 1'b0;
      v_q       <= v;
    end else begin
      unique case (state)
        ST_RUN: begin
          if (!elem_end) begin
            op_second <= 1'b1;
          end else begin
            op_second <= 1'b0;
            if (ag_last) begin
              if (last_elem) state <= ST_FLUSH;
              else           elem  <= elem_e'(elem + 3'd1);
            end
          end
        end
        ST_FLUSH: state <= ST_DONE;
        default: ;
      endcase
    end
  end

  // Response check, one cycle after each read.
  logic              rd_pend;
  logic              rd_exp;
  elem_e             rd_elem;
  logic [ADDR_W-1:0] rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend <= 1'b0;
      rd_exp  <= 1'b0;
      rd_elem <= ELEM_M0;
      rd_addr <= '0;
    end else begin
      rd_pend <= (state == ST_RUN) && is_read && !start_ok;
      rd_exp  <= rd_bit;
      rd_elem <= elem;
      rd_addr <= ag_addr;
    end
  end

  logic mismatch;
  assign mismatch = rd_pend && (mem_rdata != {DATA_W{rd_exp}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail      <= 1'b0;
      err_count <= '0;
      fail_elem <= ELEM_M0;
      fail_addr <= '0;
    end else if (start_ok) begin
      fail      <= 1'b0;
      err_count <= '0;
      fail_elem <= ELEM_M0;
      fail_addr <= '0;
    end else if (mismatch) begin
      fail <= 1'b1;
      if (err_count != '1) err_count <= err_count + 1'b1;
      if (!fail) begin
        fail_elem <= rd_elem;
        fail_addr <= rd_addr;
      end
    end
  end

  // A write is only issued together with the memory enable.
  always_comb begin
    assert (!(mem_we && !mem_en)) else $error("march_ic_ctrl: write without enable");
  end

endmodule
