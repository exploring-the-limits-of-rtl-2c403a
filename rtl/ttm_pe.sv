// Tensor-times-matrix (TTM) processing element for a CSF-stored sparse tensor.
//
// Computes O[f][c] = sum over nonzeros e of fiber f of val[e] * M[kidx[e]-1][c]
// for every stored fiber f and every matrix column c. The walk follows the
// source article's PE: for each fiber load its end boundary (the start is the
// previous fiber's end, so FbrCnt+1 boundary loads in all), then for each
// nonzero load its index and value, fetch one full matrix row and feed it to
// COL_CNT multiply-accumulate lanes (one DSP per column) with the value
// broadcast to all lanes; when the fiber is done, store the COL_CNT results as
// row f of the output. With MATRIX_ONCHIP set the whole matrix (mat_rows rows)
// is first copied from global memory into a matrix_buffer and rows are then read
// from there, the source article's on-chip variant; otherwise every nonzero loads its
// row from global memory. Matrix indexes in kidx are 1-based, as in the
// source article's kernels.
//
// Interface: start (pulse, with fbr_cnt and mat_rows stable until done) begins
// one TTM; busy is high until the single-cycle done pulse. Global memory is
// reached through read ports fptr (fiber pointers), kidx, val and mat (one
// matrix row of COL_CNT words per beat) and write port out (one output row per
// beat, address = fiber number). Addresses count elements of each buffer
// (rows for mat and out). Timing, this design's choice: one nonzero at a time,
// at best 4 cycles per nonzero plus the memory latency of two dependent loads;
// nonzeros are not overlapped.
module ttm_pe
  import sparse_pkg::*;
#(
  parameter int unsigned COL_CNT       = 16,
  parameter bit          MATRIX_ONCHIP = 1'b1,
  parameter int unsigned MAT_ROWS      = 32768,
  localparam int unsigned ROW_W        = COL_CNT * FP_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  idx_t             fbr_cnt,
  input  idx_t             mat_rows,
  output logic             busy,
  output logic             done,
  // fiber pointer array
  output logic             fptr_req_valid,
  input  logic             fptr_req_ready,
  output addr_t            fptr_req_addr,
  input  logic             fptr_rsp_valid,
  input  idx_t             fptr_rsp_data,
  // nonzero index array
  output logic             kidx_req_valid,
  input  logic             kidx_req_ready,
  output addr_t            kidx_req_addr,
  input  logic             kidx_rsp_valid,
  input  idx_t             kidx_rsp_data,
  // nonzero value array
  output logic             val_req_valid,
  input  logic             val_req_ready,
  output addr_t            val_req_addr,
  input  logic             val_rsp_valid,
  input  fp32_t            val_rsp_data,
  // dense matrix, one row per beat
  output logic             mat_req_valid,
  input  logic             mat_req_ready,
  output addr_t            mat_req_addr,
  input  logic             mat_rsp_valid,
  input  logic [ROW_W-1:0] mat_rsp_data,
  // output tensor, one row (fiber) per beat
  output logic             out_wr_valid,
  input  logic             out_wr_ready,
  output addr_t            out_wr_addr,
  output logic [ROW_W-1:0] out_wr_data
);

  localparam int unsigned BUF_AW = (MAT_ROWS > 1) ? $clog2(MAT_ROWS) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_PRE, S_PRE_W, S_PTR0, S_FIBER, S_FEND,
    S_ELE, S_ELE_W, S_ROW, S_STORE, S_DONE
  } ttm_state_t;

  ttm_state_t state;
  idx_t       fbr, fbeg, fend, ele, row;
  fp32_t      val_r;

  // load slot controls
  logic  fptr_issue, kidx_issue, val_issue, mat_issue;
  logic  fptr_consume, ele_consume, mat_consume;
  addr_t fptr_addr, mat_addr;
  logic  fptr_full, kidx_full, val_full, mat_full;
  idx_t  fptr_data, kidx_data;
  fp32_t val_data;
  logic [ROW_W-1:0] mat_data;

  // matrix row feeding the lanes
  logic             row_valid;
  logic [ROW_W-1:0] row_data;
  logic             buf_rd_en, buf_rd_valid;
  logic [ROW_W-1:0] buf_rd_data;
  logic             lane_clr;

  load_slot #(.DATA_W(IDX_W)) u_fptr (
    .clk, .rst_n, .issue(fptr_issue), .addr(fptr_addr), .consume(fptr_consume),
    .full(fptr_full), .data(fptr_data),
    .req_valid(fptr_req_valid), .req_ready(fptr_req_ready), .req_addr(fptr_req_addr),
    .rsp_valid(fptr_rsp_valid), .rsp_data(fptr_rsp_data));

  load_slot #(.DATA_W(IDX_W)) u_kidx (
    .clk, .rst_n, .issue(kidx_issue), .addr(ele), .consume(ele_consume),
    .full(kidx_full), .data(kidx_data),
    .req_valid(kidx_req_valid), .req_ready(kidx_req_ready), .req_addr(kidx_req_addr),
    .rsp_valid(kidx_rsp_valid), .rsp_data(kidx_rsp_data));

  load_slot #(.DATA_W(FP_W)) u_val (
    .clk, .rst_n, .issue(val_issue), .addr(ele), .consume(ele_consume),
    .full(val_full), .data(val_data),
    .req_valid(val_req_valid), .req_ready(val_req_ready), .req_addr(val_req_addr),
    .rsp_valid(val_rsp_valid), .rsp_data(val_rsp_data));

  load_slot #(.DATA_W(ROW_W)) u_mat (
    .clk, .rst_n, .issue(mat_issue), .addr(mat_addr), .consume(mat_consume),
    .full(mat_full), .data(mat_data),
    .req_valid(mat_req_valid), .req_ready(mat_req_ready), .req_addr(mat_req_addr),
    .rsp_valid(mat_rsp_valid), .rsp_data(mat_rsp_data));

  generate
    if (MATRIX_ONCHIP) begin : g_onchip
      matrix_buffer #(.COLS(COL_CNT), .ROWS(MAT_ROWS)) u_buf (
        .clk,
        .wr_en  (state == S_PRE_W && mat_full),
        .wr_addr(BUF_AW'(row)),
        .wr_data(mat_data),
        .rd_en  (buf_rd_en),
        .rd_addr(BUF_AW'(kidx_data - idx_t'(1))),
        .rd_data(buf_rd_data));
      assign row_valid = buf_rd_valid;
      assign row_data  = buf_rd_data;
    end else begin : g_global
      assign buf_rd_data = '0;
      assign row_valid   = mat_full;
      assign row_data    = mat_data;
    end
  endgenerate

  // control decode
  always_comb begin
    fptr_issue   = 1'b0;
    fptr_addr    = '0;
    fptr_consume = 1'b0;
    kidx_issue   = 1'b0;
    val_issue    = 1'b0;
    ele_consume  = 1'b0;
    mat_issue    = 1'b0;
    mat_addr     = '0;
    mat_consume  = 1'b0;
    buf_rd_en    = 1'b0;
    lane_clr     = 1'b0;
    unique case (state)
      S_IDLE: if (start) begin
        if (!(MATRIX_ONCHIP && mat_rows != 0)) fptr_issue = 1'b1;
      end
      S_PRE: begin
        mat_issue = 1'b1;
        mat_addr  = row;
      end
      S_PRE_W: if (mat_full) begin
        mat_consume = 1'b1;
        if (row + 1 == mat_rows) fptr_issue = 1'b1;
      end
      S_PTR0: if (fptr_full) fptr_consume = 1'b1;
      S_FIBER: if (fbr != fbr_cnt) begin
        fptr_issue = 1'b1;
        fptr_addr  = fbr + 1;
      end
      S_FEND: if (fptr_full) begin
        fptr_consume = 1'b1;
        lane_clr     = 1'b1;
      end
      S_ELE: if (ele != fend) begin
        kidx_issue = 1'b1;
        val_issue  = 1'b1;
      end
      S_ELE_W: if (kidx_full && val_full) begin
        if (MATRIX_ONCHIP) buf_rd_en = 1'b1;
        else begin
          mat_issue = 1'b1;
          mat_addr  = kidx_data - 1;
        end
      end
      S_ROW: if (row_valid) begin
        ele_consume = 1'b1;
        if (!MATRIX_ONCHIP) mat_consume = 1'b1;
      end
      default: ;
    endcase
  end

  // sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      fbr          <= '0;
      fbeg         <= '0;
      fend         <= '0;
      ele          <= '0;
      row          <= '0;
      val_r        <= FP32_ZERO;
      buf_rd_valid <= 1'b0;
    end else begin
      buf_rd_valid <= buf_rd_en;
      unique case (state)
        S_IDLE: if (start) begin
          fbr <= '0;
          row <= '0;
          state <= (MATRIX_ONCHIP && mat_rows != 0) ? S_PRE : S_PTR0;
        end
        S_PRE:   state <= S_PRE_W;
        S_PRE_W: if (mat_full) begin
          row   <= row + 1;
          state <= (row + 1 == mat_rows) ? S_PTR0 : S_PRE;
        end
        S_PTR0: if (fptr_full) begin
          fbeg  <= fptr_data;
          state <= S_FIBER;
        end
        S_FIBER: state <= (fbr == fbr_cnt) ? S_DONE : S_FEND;
        S_FEND: if (fptr_full) begin
          fend  <= fptr_data;
          ele   <= fbeg;
          state <= S_ELE;
        end
        S_ELE: state <= (ele == fend) ? S_STORE : S_ELE_W;
        S_ELE_W: if (kidx_full && val_full) begin
          val_r <= val_data;
          state <= S_ROW;
        end
        S_ROW: if (row_valid) begin
          ele   <= ele + 1;
          state <= S_ELE;
        end
        S_STORE: if (out_wr_ready) begin
          fbr   <= fbr + 1;
          fbeg  <= fend;
          state <= S_FIBER;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy         = (state != S_IDLE);
  assign done         = (state == S_DONE);
  assign out_wr_valid = (state == S_STORE);
  assign out_wr_addr  = fbr;

  // one multiply-accumulate lane (DSP) per matrix column
  for (genvar c = 0; c < COL_CNT; c++) begin : g_lane
    fp32_mac u_mac (
      .clk, .rst_n,
      .clr(lane_clr),
      .en (state == S_ROW && row_valid),
      .a  (val_r),
      .b  (row_data[c*FP_W +: FP_W]),
      .acc(out_wr_data[c*FP_W +: FP_W]));
  end

  // on-chip row indexes must fall inside the matrix that was loaded
  always_ff @(posedge clk) begin
    if (rst_n && MATRIX_ONCHIP && state == S_ELE_W && kidx_full)
      assert (kidx_data != 0 && kidx_data <= mat_rows && kidx_data <= MAT_ROWS)
        else $error("ttm_pe: matrix row index %0d outside the on-chip matrix", kidx_data);
  end

endmodule
