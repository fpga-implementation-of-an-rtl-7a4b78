// imse_object_detection: Viola-Jones face detection accelerator for an AMBA
// (LEON3-style) system on chip.
//
// The host CPU loads compressed Haar-like features into the 64 KB shared
// memory (AHB slave), writes the window configuration into the register bank
// (APB slave) and gives the start command. The stage evaluator then fetches
// the integral images from system memory through the AHB master, evaluates
// the window against the cascade and reports face / no face in the Status
// register, with an interrupt. In free mode the CPU can use the 41x33
// multiplier through the MUL_OP/MUL_Result registers and the shared memory as
// plain RAM. Block structure and the two modes follow the design; the bus
// protocols are AMBA 2.0 AHB and APB.
//
// Ports: clock and active-low synchronous reset; an APB slave (register bank,
// paddr[5:2] selects the register); an AHB slave for the shared memory (the
// system decoder drives hsel_s); an AHB master with bus request and grant;
// irq, a level interrupt. All logic runs on one clock.
module imse_object_detection
  import imse_pkg::*;
#(
  parameter int unsigned SHARED_MEM_BYTES = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  // APB slave
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  // AHB slave (shared memory)
  input  logic        hsel_s,
  input  logic [31:0] haddr_s,
  input  logic [1:0]  htrans_s,
  input  logic        hwrite_s,
  input  logic [2:0]  hsize_s,
  input  logic        hready_s,
  input  logic [31:0] hwdata_s,
  output logic [31:0] hrdata_s,
  output logic        hreadyout_s,
  output logic [1:0]  hresp_s,
  // AHB master (DMA)
  output logic        hbusreq_m,
  input  logic        hgrant_m,
  input  logic        hready_m,
  input  logic [1:0]  hresp_m,
  input  logic [31:0] hrdata_m,
  output logic [31:0] haddr_m,
  output logic [1:0]  htrans_m,
  output logic        hwrite_m,
  output logic [2:0]  hsize_m,
  output logic [2:0]  hburst_m,
  output logic [3:0]  hprot_m,
  output logic [31:0] hwdata_m,
  // interrupt
  output logic        irq
);

  localparam int unsigned SM_WORDS  = SHARED_MEM_BYTES / 4;
  localparam int unsigned SM_ADDR_W = $clog2(SM_WORDS);

  // register bank <-> APB
  logic        reg_wr, reg_rd;
  logic [3:0]  reg_idx;
  logic [31:0] reg_wdata, reg_rdata;

  // register bank <-> control
  win_cfg_t     cfg;
  logic         mode_detect, irq_en, start_cmd, done;
  logic [31:0]  mul_op1, mul_op2;
  logic         mul_res_we;
  logic [63:0]  mul_res;

  // evaluator
  logic         eval_start, eval_busy, eval_result_valid;
  eval_result_t eval_result;
  logic                  sm_en;
  logic [SM_ADDR_W-1:0]  sm_addr;
  logic [31:0]           sm_rdata;
  logic        dma_req, dma_req_ready, dma_rsp_valid, dma_rsp_err;
  logic [31:0] dma_addr, dma_rsp_data;

  // multiplier
  logic                     ev_mul_valid, mul_valid, mul_out_valid;
  logic signed [MUL_AW-1:0] ev_mul_a, mul_a;
  logic signed [MUL_BW-1:0] ev_mul_b, mul_b;
  logic signed [MUL_PW-1:0] mul_p;

  apb_slave_if u_apb (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rdata
  );

  imse_register_bank u_regs (
    .clk, .rst_n, .reg_wr, .reg_idx, .reg_wdata, .reg_rdata,
    .cfg, .mode_detect, .irq_en, .start_cmd, .mul_op1, .mul_op2, .done,
    .busy(eval_busy), .result_valid(eval_result_valid), .result(eval_result),
    .mul_res_we, .mul_res
  );

  imse_control_logic u_ctrl (
    .clk, .rst_n, .mode_detect, .irq_en, .start_cmd, .done, .mul_op1, .mul_op2,
    .mul_res_we, .mul_res, .irq,
    .eval_start, .eval_busy,
    .ev_mul_valid, .ev_mul_a, .ev_mul_b,
    .mul_valid, .mul_a, .mul_b, .mul_out_valid, .mul_p
  );

  imse_stage_evaluator_unit #(.SM_ADDR_W(SM_ADDR_W)) u_eval (
    .clk, .rst_n, .start(eval_start), .cfg, .busy(eval_busy),
    .result_valid(eval_result_valid), .result(eval_result),
    .sm_en, .sm_addr, .sm_rdata,
    .dma_req, .dma_addr, .dma_req_ready, .dma_rsp_valid, .dma_rsp_data, .dma_rsp_err,
    .mul_valid(ev_mul_valid), .mul_a(ev_mul_a), .mul_b(ev_mul_b),
    .mul_out_valid, .mul_p
  );

  mul41x33signed u_mul (
    .clk, .rst_n, .in_valid(mul_valid), .a(mul_a), .b(mul_b),
    .out_valid(mul_out_valid), .p(mul_p)
  );

  ahb_master_if u_ahbm (
    .clk, .rst_n,
    .req(dma_req), .addr(dma_addr), .req_ready(dma_req_ready),
    .rsp_valid(dma_rsp_valid), .rsp_data(dma_rsp_data), .rsp_err(dma_rsp_err),
    .hbusreq(hbusreq_m), .hgrant(hgrant_m), .hready(hready_m), .hresp(hresp_m),
    .hrdata(hrdata_m), .haddr(haddr_m), .htrans(htrans_m), .hwrite(hwrite_m),
    .hsize(hsize_m), .hburst(hburst_m), .hprot(hprot_m), .hwdata(hwdata_m)
  );

  ahb_dpram #(.SIZE_BYTES(SHARED_MEM_BYTES)) u_shmem (
    .clk, .rst_n,
    .hsel(hsel_s), .haddr(haddr_s), .htrans(htrans_s), .hwrite(hwrite_s),
    .hsize(hsize_s), .hready_in(hready_s), .hwdata(hwdata_s),
    .hrdata(hrdata_s), .hready_out(hreadyout_s), .hresp(hresp_s),
    .b_en(sm_en), .b_addr(sm_addr), .b_rdata(sm_rdata)
  );

endmodule
