// MTTKRP processing element for a third-order CSF-stored sparse tensor.
//
// Computes, for every stored slice s, the output row
//   V[s][c] = sum over fibers f of s of  A[fidx[f]-1][c] *
//             ( sum over nonzeros e of f of val[e] * B[kidx[e]-1][c] )
// where A is matrix1 (indexed by the fiber coordinate) and B is matrix2
// (indexed by the nonzero coordinate). The walk follows the source article's PE: load
// the slice's end boundary (SlcCnt+1 slice-boundary loads in all), then for
// each fiber its end boundary and coordinate (FbrCnt+1 and FbrCnt loads), then
// for each nonzero its index and value and one row of matrix2, accumulated
// into the inner lanes (inC); when the fiber ends, one row of matrix1 is
// loaded and inB += inC * matrix1 row, and inC is cleared. When the slice ends
// the COL_CNT inB values are stored as output row s. The PE has two
// multiply-accumulate lanes (DSPs) per column. Indexes are 1-based.
//
// Interface: start (pulse, with slc_cnt stable until done) begins one MTTKRP;
// busy is high until the single-cycle done pulse. Read ports sptr (slice
// pointers), fptr (fiber pointers), fidx (fiber coordinates), kidx, val, mat1
// and mat2 (one row of COL_CNT words per beat); write port out (one output row
// per beat, address = slice number). Timing, this design's choice: one load
// group at a time, nonzeros and fibers are not overlapped.
module mttkrp_pe
  import sparse_pkg::*;
#(
  parameter int unsigned COL_CNT = 16,
  localparam int unsigned ROW_W  = COL_CNT * FP_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  idx_t             slc_cnt,
  output logic             busy,
  output logic             done,
  output logic             sptr_req_valid,
  input  logic             sptr_req_ready,
  output addr_t            sptr_req_addr,
  input  logic             sptr_rsp_valid,
  input  idx_t             sptr_rsp_data,
  output logic             fptr_req_valid,
  input  logic             fptr_req_ready,
  output addr_t            fptr_req_addr,
  input  logic             fptr_rsp_valid,
  input  idx_t             fptr_rsp_data,
  output logic             fidx_req_valid,
  input  logic             fidx_req_ready,
  output addr_t            fidx_req_addr,
  input  logic             fidx_rsp_valid,
  input  idx_t             fidx_rsp_data,
  output logic             kidx_req_valid,
  input  logic             kidx_req_ready,
  output addr_t            kidx_req_addr,
  input  logic             kidx_rsp_valid,
  input  idx_t             kidx_rsp_data,
  output logic             val_req_valid,
  input  logic             val_req_ready,
  output addr_t            val_req_addr,
  input  logic             val_rsp_valid,
  input  fp32_t            val_rsp_data,
  output logic             mat1_req_valid,
  input  logic             mat1_req_ready,
  output addr_t            mat1_req_addr,
  input  logic             mat1_rsp_valid,
  input  logic [ROW_W-1:0] mat1_rsp_data,
  output logic             mat2_req_valid,
  input  logic             mat2_req_ready,
  output addr_t            mat2_req_addr,
  input  logic             mat2_rsp_valid,
  input  logic [ROW_W-1:0] mat2_rsp_data,
  output logic             out_wr_valid,
  input  logic             out_wr_ready,
  output addr_t            out_wr_addr,
  output logic [ROW_W-1:0] out_wr_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_SPTR0, S_FPTR0, S_SLICE, S_SEND, S_FIBER, S_FIBER_W,
    S_ELE, S_ELE_W, S_ROW2, S_ROW1, S_STORE, S_DONE
  } mttkrp_state_t;

  mttkrp_state_t state;
  idx_t  slc, send, fbr, fend, fcoord, ele;
  fp32_t val_r;

  logic  sptr_issue, sptr_consume, fptr_issue, fbr_consume, fidx_issue;
  logic  kidx_issue, val_issue, ele_consume, mat1_issue, mat1_consume;
  logic  mat2_issue, mat2_consume;
  addr_t sptr_addr, fptr_addr;
  logic  sptr_full, fptr_full, fidx_full, kidx_full, val_full, mat1_full, mat2_full;
  idx_t  sptr_data, fptr_data, fidx_data, kidx_data;
  fp32_t val_data;
  logic [ROW_W-1:0] mat1_data, mat2_data, inc_acc;
  logic  inb_clr, inc_clr, inb_en, inc_en;

  load_slot #(.DATA_W(IDX_W)) u_sptr (
    .clk, .rst_n, .issue(sptr_issue), .addr(sptr_addr), .consume(sptr_consume),
    .full(sptr_full), .data(sptr_data),
    .req_valid(sptr_req_valid), .req_ready(sptr_req_ready), .req_addr(sptr_req_addr),
    .rsp_valid(sptr_rsp_valid), .rsp_data(sptr_rsp_data));

  load_slot #(.DATA_W(IDX_W)) u_fptr (
    .clk, .rst_n, .issue(fptr_issue), .addr(fptr_addr), .consume(fbr_consume),
    .full(fptr_full), .data(fptr_data),
    .req_valid(fptr_req_valid), .req_ready(fptr_req_ready), .req_addr(fptr_req_addr),
    .rsp_valid(fptr_rsp_valid), .rsp_data(fptr_rsp_data));

  load_slot #(.DATA_W(IDX_W)) u_fidx (
    .clk, .rst_n, .issue(fidx_issue), .addr(fbr), .consume(fbr_consume),
    .full(fidx_full), .data(fidx_data),
    .req_valid(fidx_req_valid), .req_ready(fidx_req_ready), .req_addr(fidx_req_addr),
    .rsp_valid(fidx_rsp_valid), .rsp_data(fidx_rsp_data));

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

  load_slot #(.DATA_W(ROW_W)) u_mat1 (
    .clk, .rst_n, .issue(mat1_issue), .addr(fcoord - 1), .consume(mat1_consume),
    .full(mat1_full), .data(mat1_data),
    .req_valid(mat1_req_valid), .req_ready(mat1_req_ready), .req_addr(mat1_req_addr),
    .rsp_valid(mat1_rsp_valid), .rsp_data(mat1_rsp_data));

  load_slot #(.DATA_W(ROW_W)) u_mat2 (
    .clk, .rst_n, .issue(mat2_issue), .addr(kidx_data - 1), .consume(mat2_consume),
    .full(mat2_full), .data(mat2_data),
    .req_valid(mat2_req_valid), .req_ready(mat2_req_ready), .req_addr(mat2_req_addr),
    .rsp_valid(mat2_rsp_valid), .rsp_data(mat2_rsp_data));

  always_comb begin
    sptr_issue   = 1'b0;
    sptr_addr    = '0;
    sptr_consume = 1'b0;
    fptr_issue   = 1'b0;
    fptr_addr    = '0;
    fidx_issue   = 1'b0;
    fbr_consume  = 1'b0;
    kidx_issue   = 1'b0;
    val_issue    = 1'b0;
    ele_consume  = 1'b0;
    mat1_issue   = 1'b0;
    mat1_consume = 1'b0;
    mat2_issue   = 1'b0;
    mat2_consume = 1'b0;
    inb_clr      = 1'b0;
    inc_clr      = 1'b0;
    inb_en       = 1'b0;
    inc_en       = 1'b0;
    unique case (state)
      S_IDLE: if (start) sptr_issue = 1'b1;
      S_SPTR0: if (sptr_full) begin
        sptr_consume = 1'b1;
        fptr_issue   = 1'b1;
      end
      S_FPTR0: if (fptr_full) fbr_consume = 1'b1;
      S_SLICE: if (slc != slc_cnt) begin
        sptr_issue = 1'b1;
        sptr_addr  = slc + 1;
      end
      S_SEND: if (sptr_full) begin
        sptr_consume = 1'b1;
        inb_clr      = 1'b1;
        inc_clr      = 1'b1;
      end
      S_FIBER: if (fbr != send) begin
        fptr_issue = 1'b1;
        fptr_addr  = fbr + 1;
        fidx_issue = 1'b1;
      end
      S_FIBER_W: if (fptr_full && fidx_full) fbr_consume = 1'b1;
      S_ELE: if (ele == fend) mat1_issue = 1'b1;
      else begin
        kidx_issue = 1'b1;
        val_issue  = 1'b1;
      end
      S_ELE_W: if (kidx_full && val_full) mat2_issue = 1'b1;
      S_ROW2: if (mat2_full) begin
        inc_en       = 1'b1;
        ele_consume  = 1'b1;
        mat2_consume = 1'b1;
      end
      S_ROW1: if (mat1_full) begin
        inb_en       = 1'b1;
        inc_clr      = 1'b1;
        mat1_consume = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      slc    <= '0;
      send   <= '0;
      fbr    <= '0;
      fend   <= '0;
      fcoord <= '0;
      ele    <= '0;
      val_r  <= FP32_ZERO;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          slc   <= '0;
          state <= S_SPTR0;
        end
        S_SPTR0: if (sptr_full) begin
          fbr   <= sptr_data;
          state <= S_FPTR0;
        end
        S_FPTR0: if (fptr_full) begin
          ele   <= fptr_data;
          state <= S_SLICE;
        end
        S_SLICE: state <= (slc == slc_cnt) ? S_DONE : S_SEND;
        S_SEND: if (sptr_full) begin
          send  <= sptr_data;
          state <= S_FIBER;
        end
        S_FIBER: state <= (fbr == send) ? S_STORE : S_FIBER_W;
        S_FIBER_W: if (fptr_full && fidx_full) begin
          fend   <= fptr_data;
          fcoord <= fidx_data;
          state  <= S_ELE;
        end
        S_ELE: state <= (ele == fend) ? S_ROW1 : S_ELE_W;
        S_ELE_W: if (kidx_full && val_full) begin
          val_r <= val_data;
          state <= S_ROW2;
        end
        S_ROW2: if (mat2_full) begin
          ele   <= ele + 1;
          state <= S_ELE;
        end
        S_ROW1: if (mat1_full) begin
          fbr   <= fbr + 1;
          state <= S_FIBER;
        end
        S_STORE: if (out_wr_ready) begin
          slc   <= slc + 1;
          state <= S_SLICE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy         = (state != S_IDLE);
  assign done         = (state == S_DONE);
  assign out_wr_valid = (state == S_STORE);
  assign out_wr_addr  = slc;

  // two multiply-accumulate lanes (DSPs) per column: inC over a fiber's
  // nonzeros, inB over a slice's fibers
  for (genvar c = 0; c < COL_CNT; c++) begin : g_lane
    fp32_mac u_inc (
      .clk, .rst_n,
      .clr(inc_clr),
      .en (inc_en),
      .a  (val_r),
      .b  (mat2_data[c*FP_W +: FP_W]),
      .acc(inc_acc[c*FP_W +: FP_W]));
    fp32_mac u_inb (
      .clk, .rst_n,
      .clr(inb_clr),
      .en (inb_en),
      .a  (inc_acc[c*FP_W +: FP_W]),
      .b  (mat1_data[c*FP_W +: FP_W]),
      .acc(out_wr_data[c*FP_W +: FP_W]));
  end

endmodule
