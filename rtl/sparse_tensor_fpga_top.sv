// FPGA sparse tensor accelerator: TTM and MTTKRP processing elements.
//
// The two tensor methods that dominate Tucker and CP decomposition each get a
// specialised processing element that walks a sparse tensor stored in the
// compressed sparse fiber (CSF) format straight from global memory:
//   ttm_pe     O[fiber][c] = sum_k T[fiber,k] * M[k][c]     (TTM_COL_CNT DSP lanes)
//   mttkrp_pe  V[slice][c] = sum_j A[j][c] * sum_k T[slice,j,k] * B[k][c]
//                                                          (2*MT_COL_CNT DSP lanes)
// They are independent designs that the host starts one at a time or side by
// side; each has its own start/done handshake and its own global-memory ports,
// brought out here as plain valid/ready request and response signals so the
// board's memory system (not part of this design) can be attached. Column
// counts of 16 and the on-chip TTM matrix follow the configuration the source article
// reports resource use for; port protocols are this design's own.
// Timing: see ttm_pe and mttkrp_pe; the top adds no registers.
module sparse_tensor_fpga_top
  import sparse_pkg::*;
#(
  parameter int unsigned TTM_COL_CNT       = 16,
  parameter bit          TTM_MATRIX_ONCHIP = 1'b1,
  parameter int unsigned TTM_MAT_ROWS      = 32768,
  parameter int unsigned MT_COL_CNT        = 16,
  localparam int unsigned TTM_ROW_W        = TTM_COL_CNT * FP_W,
  localparam int unsigned MT_ROW_W         = MT_COL_CNT * FP_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // TTM processing element
  input  logic                 ttm_start,
  input  idx_t                 ttm_fbr_cnt,
  input  idx_t                 ttm_mat_rows,
  output logic                 ttm_busy,
  output logic                 ttm_done,
  output logic                 ttm_fptr_req_valid,
  input  logic                 ttm_fptr_req_ready,
  output addr_t                ttm_fptr_req_addr,
  input  logic                 ttm_fptr_rsp_valid,
  input  idx_t                 ttm_fptr_rsp_data,
  output logic                 ttm_kidx_req_valid,
  input  logic                 ttm_kidx_req_ready,
  output addr_t                ttm_kidx_req_addr,
  input  logic                 ttm_kidx_rsp_valid,
  input  idx_t                 ttm_kidx_rsp_data,
  output logic                 ttm_val_req_valid,
  input  logic                 ttm_val_req_ready,
  output addr_t                ttm_val_req_addr,
  input  logic                 ttm_val_rsp_valid,
  input  fp32_t                ttm_val_rsp_data,
  output logic                 ttm_mat_req_valid,
  input  logic                 ttm_mat_req_ready,
  output addr_t                ttm_mat_req_addr,
  input  logic                 ttm_mat_rsp_valid,
  input  logic [TTM_ROW_W-1:0] ttm_mat_rsp_data,
  output logic                 ttm_out_wr_valid,
  input  logic                 ttm_out_wr_ready,
  output addr_t                ttm_out_wr_addr,
  output logic [TTM_ROW_W-1:0] ttm_out_wr_data,
  // MTTKRP processing element
  input  logic                 mt_start,
  input  idx_t                 mt_slc_cnt,
  output logic                 mt_busy,
  output logic                 mt_done,
  output logic                 mt_sptr_req_valid,
  input  logic                 mt_sptr_req_ready,
  output addr_t                mt_sptr_req_addr,
  input  logic                 mt_sptr_rsp_valid,
  input  idx_t                 mt_sptr_rsp_data,
  output logic                 mt_fptr_req_valid,
  input  logic                 mt_fptr_req_ready,
  output addr_t                mt_fptr_req_addr,
  input  logic                 mt_fptr_rsp_valid,
  input  idx_t                 mt_fptr_rsp_data,
  output logic                 mt_fidx_req_valid,
  input  logic                 mt_fidx_req_ready,
  output addr_t                mt_fidx_req_addr,
  input  logic                 mt_fidx_rsp_valid,
  input  idx_t                 mt_fidx_rsp_data,
  output logic                 mt_kidx_req_valid,
  input  logic                 mt_kidx_req_ready,
  output addr_t                mt_kidx_req_addr,
  input  logic                 mt_kidx_rsp_valid,
  input  idx_t                 mt_kidx_rsp_data,
  output logic                 mt_val_req_valid,
  input  logic                 mt_val_req_ready,
  output addr_t                mt_val_req_addr,
  input  logic                 mt_val_rsp_valid,
  input  fp32_t                mt_val_rsp_data,
  output logic                 mt_mat1_req_valid,
  input  logic                 mt_mat1_req_ready,
  output addr_t                mt_mat1_req_addr,
  input  logic                 mt_mat1_rsp_valid,
  input  logic [MT_ROW_W-1:0]  mt_mat1_rsp_data,
  output logic                 mt_mat2_req_valid,
  input  logic                 mt_mat2_req_ready,
  output addr_t                mt_mat2_req_addr,
  input  logic                 mt_mat2_rsp_valid,
  input  logic [MT_ROW_W-1:0]  mt_mat2_rsp_data,
  output logic                 mt_out_wr_valid,
  input  logic                 mt_out_wr_ready,
  output addr_t                mt_out_wr_addr,
  output logic [MT_ROW_W-1:0]  mt_out_wr_data
);

  ttm_pe #(
    .COL_CNT      (TTM_COL_CNT),
    .MATRIX_ONCHIP(TTM_MATRIX_ONCHIP),
    .MAT_ROWS     (TTM_MAT_ROWS)
  ) u_ttm (
    .clk, .rst_n,
    .start(ttm_start),
    .fbr_cnt(ttm_fbr_cnt),
    .mat_rows(ttm_mat_rows),
    .busy(ttm_busy),
    .done(ttm_done),
    .fptr_req_valid(ttm_fptr_req_valid),
    .fptr_req_ready(ttm_fptr_req_ready),
    .fptr_req_addr(ttm_fptr_req_addr),
    .fptr_rsp_valid(ttm_fptr_rsp_valid),
    .fptr_rsp_data(ttm_fptr_rsp_data),
    .kidx_req_valid(ttm_kidx_req_valid),
    .kidx_req_ready(ttm_kidx_req_ready),
    .kidx_req_addr(ttm_kidx_req_addr),
    .kidx_rsp_valid(ttm_kidx_rsp_valid),
    .kidx_rsp_data(ttm_kidx_rsp_data),
    .val_req_valid(ttm_val_req_valid),
    .val_req_ready(ttm_val_req_ready),
    .val_req_addr(ttm_val_req_addr),
    .val_rsp_valid(ttm_val_rsp_valid),
    .val_rsp_data(ttm_val_rsp_data),
    .mat_req_valid(ttm_mat_req_valid),
    .mat_req_ready(ttm_mat_req_ready),
    .mat_req_addr(ttm_mat_req_addr),
    .mat_rsp_valid(ttm_mat_rsp_valid),
    .mat_rsp_data(ttm_mat_rsp_data),
    .out_wr_valid(ttm_out_wr_valid),
    .out_wr_ready(ttm_out_wr_ready),
    .out_wr_addr(ttm_out_wr_addr),
    .out_wr_data(ttm_out_wr_data)
  );

  mttkrp_pe #(
    .COL_CNT(MT_COL_CNT)
  ) u_mttkrp (
    .clk, .rst_n,
    .start(mt_start),
    .slc_cnt(mt_slc_cnt),
    .busy(mt_busy),
    .done(mt_done),
    .sptr_req_valid(mt_sptr_req_valid),
    .sptr_req_ready(mt_sptr_req_ready),
    .sptr_req_addr(mt_sptr_req_addr),
    .sptr_rsp_valid(mt_sptr_rsp_valid),
    .sptr_rsp_data(mt_sptr_rsp_data),
    .fptr_req_valid(mt_fptr_req_valid),
    .fptr_req_ready(mt_fptr_req_ready),
    .fptr_req_addr(mt_fptr_req_addr),
    .fptr_rsp_valid(mt_fptr_rsp_valid),
    .fptr_rsp_data(mt_fptr_rsp_data),
    .fidx_req_valid(mt_fidx_req_valid),
    .fidx_req_ready(mt_fidx_req_ready),
    .fidx_req_addr(mt_fidx_req_addr),
    .fidx_rsp_valid(mt_fidx_rsp_valid),
    .fidx_rsp_data(mt_fidx_rsp_data),
    .kidx_req_valid(mt_kidx_req_valid),
    .kidx_req_ready(mt_kidx_req_ready),
    .kidx_req_addr(mt_kidx_req_addr),
    .kidx_rsp_valid(mt_kidx_rsp_valid),
    .kidx_rsp_data(mt_kidx_rsp_data),
    .val_req_valid(mt_val_req_valid),
    .val_req_ready(mt_val_req_ready),
    .val_req_addr(mt_val_req_addr),
    .val_rsp_valid(mt_val_rsp_valid),
    .val_rsp_data(mt_val_rsp_data),
    .mat1_req_valid(mt_mat1_req_valid),
    .mat1_req_ready(mt_mat1_req_ready),
    .mat1_req_addr(mt_mat1_req_addr),
    .mat1_rsp_valid(mt_mat1_rsp_valid),
    .mat1_rsp_data(mt_mat1_rsp_data),
    .mat2_req_valid(mt_mat2_req_valid),
    .mat2_req_ready(mt_mat2_req_ready),
    .mat2_req_addr(mt_mat2_req_addr),
    .mat2_rsp_valid(mt_mat2_rsp_valid),
    .mat2_rsp_data(mt_mat2_rsp_data),
    .out_wr_valid(mt_out_wr_valid),
    .out_wr_ready(mt_out_wr_ready),
    .out_wr_addr(mt_out_wr_addr),
    .out_wr_data(mt_out_wr_data)
  );

endmodule
