// imse_register_bank: the accelerator's APB-visible registers.
//
// Sixteen 32-bit registers, in the order of the design's block diagram:
// Status, Config, Scale, Coordinates_XY, Address_Sum, Address_SqSum,
// Image_Dimension, Start_Node_and_Stage, MUL_OP1, MUL_OP2, MUL_Result_LOW,
// MUL_Result_HIGH, End_Stage_number, Search_Window_WH, Search_Window_dimension
// and Img_Width. The names are the design's; the bit layouts (see imse_pkg)
// and access rules are this implementation's:
//  - Status is read-only except bit 0 (done), which a write of 1 clears.
//    done is set, and face, error and stage are loaded, by result_valid.
//    busy (bit 2) reads the live state of the evaluator.
//  - Config: writing 1 to bit 1 gives a one-cycle start_cmd on the next clock,
//    together with the mode written in the same write; bit 1 reads 0.
//  - MUL_Result_LOW/HIGH are read-only; they take the product when mul_res_we,
//    and a read in that same cycle already returns the new product, so the
//    product of a MUL_OP write can be read from the second clock after it.
//  - All other registers are plain read/write configuration.
// Writes take effect on the clock edge of the write strobe; reads are
// combinational from reg_idx.
module imse_register_bank
  import imse_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // from the APB slave
  input  logic         reg_wr,
  input  logic [3:0]   reg_idx,
  input  logic [31:0]  reg_wdata,
  output logic [31:0]  reg_rdata,
  // configuration out
  output win_cfg_t     cfg,
  output logic         mode_detect,
  output logic         irq_en,
  output logic         start_cmd,
  output logic [31:0]  mul_op1,
  output logic [31:0]  mul_op2,
  output logic         done,
  // status and results in
  input  logic         busy,
  input  logic         result_valid,
  input  eval_result_t result,
  input  logic         mul_res_we,
  input  logic [63:0]  mul_res
);

  logic [31:0] regs [16];
  logic        st_done, st_face, st_error;
  logic [7:0]  st_stage;

  logic wr_any;
  assign wr_any = reg_wr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
      st_done  <= 1'b0;
      st_face  <= 1'b0;
      st_error <= 1'b0;
      st_stage <= '0;
    end else begin
      if (wr_any) begin
        unique case (reg_idx_e'(reg_idx))
          REG_STATUS: if (reg_wdata[ST_DONE]) st_done <= 1'b0;
          REG_CONFIG: regs[REG_CONFIG] <= reg_wdata & ~(32'd1 << CFG_START);
          REG_MUL_RES_LO, REG_MUL_RES_HI: ;
          default:    regs[reg_idx] <= reg_wdata;
        endcase
      end
      if (start_cmd) st_done <= 1'b0;
      if (result_valid) begin
        st_done  <= 1'b1;
        st_face  <= result.face;
        st_error <= result.error;
        st_stage <= result.stage;
      end
      if (mul_res_we) begin
        regs[REG_MUL_RES_LO] <= mul_res[31:0];
        regs[REG_MUL_RES_HI] <= mul_res[63:32];
      end
    end
  end

  // The start command follows the Config write by one clock, so that it sees
  // the mode written together with it.
  always_ff @(posedge clk) begin
    if (!rst_n) start_cmd <= 1'b0;
    else        start_cmd <= reg_wr && (reg_idx == REG_CONFIG) && reg_wdata[CFG_START];
  end

  always_comb begin
    reg_rdata = regs[reg_idx];
    if (reg_idx == REG_STATUS)
      reg_rdata = {16'd0, st_stage, 4'd0, st_error, busy, st_face, st_done};
    // a product being written is returned at once (write-through bypass)
    if (mul_res_we && reg_idx == REG_MUL_RES_LO) reg_rdata = mul_res[31:0];
    if (mul_res_we && reg_idx == REG_MUL_RES_HI) reg_rdata = mul_res[63:32];
  end

  assign mode_detect = regs[REG_CONFIG][CFG_MODE];
  assign irq_en      = regs[REG_CONFIG][CFG_IRQEN];
  assign mul_op1     = regs[REG_MUL_OP1];
  assign mul_op2     = regs[REG_MUL_OP2];
  assign done        = st_done;

  always_comb begin
    cfg.scale       = regs[REG_SCALE];
    cfg.win_x       = regs[REG_COORD_XY][15:0];
    cfg.win_y       = regs[REG_COORD_XY][31:16];
    cfg.addr_sum    = regs[REG_ADDR_SUM];
    cfg.addr_sqsum  = regs[REG_ADDR_SQSUM];
    cfg.img_w       = regs[REG_IMG_DIM][15:0];
    cfg.img_h       = regs[REG_IMG_DIM][31:16];
    cfg.start_node  = regs[REG_START_NODE][15:0];
    cfg.start_stage = regs[REG_START_NODE][23:16];
    cfg.end_stage   = regs[REG_END_STAGE][7:0];
    cfg.win_wh      = regs[REG_WIN_WH];
    cfg.win_w       = regs[REG_WIN_DIM][15:0];
    cfg.win_h       = regs[REG_WIN_DIM][31:16];
    cfg.stride      = regs[REG_IMG_WIDTH][15:0];
  end

endmodule
