// march_ic_top: March iC- memory built-in self-test with its SRAM.
//
// march_ic_ctrl runs the March iC- test (10N operations, Hd = 1 address
// order, alternating data) on sram_core, whose address decoder is built
// from NOR predecoders. The test is aimed at address decoder open faults:
// an open transistor in a NOR gate leaves the old select line high after a
// single-bit address change, so one write lands in two words. Because
// neighbouring addresses receive opposite data, the overwritten word then
// reads back the wrong value in the next element, and because the two
// words hold equal data whenever a read selects both, reads stay
// well-defined.
//
// Interface: pulse start with v (start value of the alternating data);
// done rises 10 * 2**ADDR_W + 1 cycles later. fail, err_count and the
// element and address of the first mismatch are then valid and hold until
// the next start. All flops are reset by rst_n except the memory array.
module march_ic_top #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned PRE_W  = 2,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              v,
  output logic              busy,
  output logic              done,
  output logic              fail,
  output logic [CNT_W-1:0]  err_count,
  output logic [2:0]        fail_elem,
  output logic [ADDR_W-1:0] fail_addr
);

  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  march_pkg::elem_e  fail_elem_e;

  march_ic_ctrl #(
    .ADDR_W (ADDR_W),
    .DATA_W  (DATA_W),
    .FIELD_W (PRE_W),
    .CNT_W   (CNT_W)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .v         (v),
    .busy      (busy),
    .done      (done),
    .mem_en    (mem_en),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_rdata (mem_rdata),
    .fail      (fail),
    .err_count (err_count),
    .fail_elem (fail_elem_e),
    .fail_addr (fail_addr)
  );

  assign fail_elem = fail_elem_e;

  sram_core #(
    .ADDR_W (ADDR_W),
    .DATA_W (DATA_W),
    .PRE_W  (PRE_W)
  ) u_sram (
    .clk   (clk),
    .en    (mem_en),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

endmodule
