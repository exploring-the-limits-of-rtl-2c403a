// Test environment for one ttm_pe configuration: the processing element, its
// global-memory models and a reference model.
//
// Runs several random CSF tensors, plus the two corner shapes that bound the
// arithmetic intensity (a single fiber with a single nonzero, and a single
// fiber holding every nonzero). For each run it checks every output value
// bit-exactly against a reference that accumulates the rounded products in the
// same order, checks that each output row is written once, and counts the
// loads of every buffer against the closed-form counts: FbrCnt+1 fiber
// pointers, NnzCnt indexes and values, and NnzCnt matrix rows (or, with the
// on-chip matrix, each matrix row once). Results go out through checks,
// failures and finished.
module ttm_env
  import fp_ref_pkg::*;
#(
  parameter int unsigned COLS    = 4,
  parameter bit          ONCHIP  = 1'b0,
  parameter int unsigned K_ROWS  = 24,
  parameter int unsigned RUNS    = 6
) (
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned MAXF = 64;
  localparam int unsigned MAXN = 256;
  localparam int unsigned RW   = COLS * 32;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] fbr_cnt = 0, mat_rows = 0;
  always #5 clk = ~clk;

  logic fptr_req_valid, fptr_req_ready, fptr_rsp_valid;
  logic kidx_req_valid, kidx_req_ready, kidx_rsp_valid;
  logic val_req_valid, val_req_ready, val_rsp_valid;
  logic mat_req_valid, mat_req_ready, mat_rsp_valid;
  logic out_wr_valid, out_wr_ready;
  logic [31:0] fptr_req_addr, kidx_req_addr, val_req_addr, mat_req_addr, out_wr_addr;
  logic [31:0] fptr_rsp_data, kidx_rsp_data, val_rsp_data;
  logic [RW-1:0] mat_rsp_data, out_wr_data;

  ttm_pe #(.COL_CNT(COLS), .MATRIX_ONCHIP(ONCHIP), .MAT_ROWS(K_ROWS)) dut (.*);

  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXF + 1)) m_fptr (.clk,
    .req_valid(fptr_req_valid), .req_ready(fptr_req_ready), .req_addr(fptr_req_addr),
    .rsp_valid(fptr_rsp_valid), .rsp_data(fptr_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) m_kidx (.clk,
    .req_valid(kidx_req_valid), .req_ready(kidx_req_ready), .req_addr(kidx_req_addr),
    .rsp_valid(kidx_rsp_valid), .rsp_data(kidx_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) m_val (.clk,
    .req_valid(val_req_valid), .req_ready(val_req_ready), .req_addr(val_req_addr),
    .rsp_valid(val_rsp_valid), .rsp_data(val_rsp_data));
  gmem_rd_model #(.DATA_W(RW), .DEPTH(K_ROWS)) m_mat (.clk,
    .req_valid(mat_req_valid), .req_ready(mat_req_ready), .req_addr(mat_req_addr),
    .rsp_valid(mat_rsp_valid), .rsp_data(mat_rsp_data));
  gmem_wr_model #(.DATA_W(RW), .DEPTH(MAXF)) m_out (.clk,
    .wr_valid(out_wr_valid), .wr_ready(out_wr_ready), .wr_addr(out_wr_addr),
    .wr_data(out_wr_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL ttm_env(onchip=%0d): %s", ONCHIP, what);
    end
  endtask

  int nf, nnz;
  int fptr [MAXF+1];
  logic [31:0] kidx [MAXN];
  logic [31:0] vals [MAXN];
  logic [31:0] mat [K_ROWS][COLS];
  logic [31:0] acc;
  int c0_fptr, c0_kidx, c0_val, c0_mat, c0_out;

  task automatic run(input int shape);
    // shape 0: random; 1: one fiber, one nonzero; 2: one fiber, all nonzeros
    nf  = (shape == 0) ? int'($urandom_range(1, 20)) : 1;
    nnz = 0;
    fptr[0] = 0;
    for (int f = 0; f < nf; f++) begin
      int len;
      len = (shape == 1) ? 1 : (shape == 2) ? 40 : int'($urandom_range(1, 6));
      for (int e = 0; e < len; e++) begin
        kidx[nnz] = 32'($urandom_range(1, K_ROWS));
        vals[nnz] = rand_fp(4);
        nnz++;
      end
      fptr[f+1] = nnz;
    end
    for (int r = 0; r < int'(K_ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        mat[r][c] = rand_fp(4);
        m_mat.mem[r][c*32 +: 32] = mat[r][c];
      end
    for (int f = 0; f <= nf; f++) m_fptr.mem[f] = 32'(fptr[f]);
    for (int e = 0; e < nnz; e++) begin
      m_kidx.mem[e] = kidx[e];
      m_val.mem[e]  = vals[e];
    end
    for (int f = 0; f < int'(MAXF); f++) m_out.writes[f] = 0;
    c0_fptr = m_fptr.count; c0_kidx = m_kidx.count; c0_val = m_val.count;
    c0_mat  = m_mat.count;  c0_out  = m_out.count;

    @(posedge clk);
    fbr_cnt  <= 32'(nf);
    mat_rows <= K_ROWS;
    start    <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(posedge clk);
    check(!busy, "busy after done");

    for (int f = 0; f < nf; f++) begin
      check(m_out.writes[f] == 1, $sformatf("output row %0d written %0d times", f, m_out.writes[f]));
      for (int c = 0; c < int'(COLS); c++) begin
        acc = 32'd0;
        for (int e = fptr[f]; e < fptr[f+1]; e++)
          acc = ref_add(acc, ref_mul(vals[e], mat[kidx[e]-1][c]));
        check(m_out.mem[f][c*32 +: 32] == acc,
              $sformatf("O[%0d][%0d]=%h expected %h", f, c, m_out.mem[f][c*32 +: 32], acc));
      end
    end
    check(m_fptr.count - c0_fptr == nf + 1, "fiber pointer loads != FbrCnt+1");
    check(m_kidx.count - c0_kidx == nnz, "index loads != NnzCnt");
    check(m_val.count - c0_val == nnz, "value loads != NnzCnt");
    check(m_mat.count - c0_mat == (ONCHIP ? int'(K_ROWS) : nnz), "matrix row loads");
    check(m_out.count - c0_out == nf, "output row stores != FbrCnt");
    if (!ONCHIP)
      check((m_fptr.count - c0_fptr) + (m_kidx.count - c0_kidx) + (m_val.count - c0_val)
            + int'(COLS) * (m_mat.count - c0_mat) == nf + nnz * (int'(COLS) + 2) + 1,
            "total loaded words != FbrCnt + NnzCnt*(ColCnt+2) + 1");
    check(m_fptr.bad + m_kidx.bad + m_val.bad + m_mat.bad + m_out.bad == 0, "address out of range");
  endtask

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(1);
    run(2);
    for (int i = 0; i < int'(RUNS); i++) run(0);
    finished = 1'b1;
  end
endmodule
