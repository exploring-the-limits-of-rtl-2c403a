// Self-checking testbench of the MTTKRP processing element.
//
// Builds random third-order CSF tensors (plus the corner shapes with one
// slice, one fiber and one nonzero, and one slice holding every fiber), runs
// the PE against randomly stalling global-memory models and checks every
// output value bit-exactly against a reference that follows the same order of
// rounded operations: inC = sum of val*matrix2 over a fiber, then
// inB += inC*matrix1. It also counts loads of every buffer against the
// closed-form counts (SlcCnt+1 slice pointers, FbrCnt+1 fiber pointers, FbrCnt
// fiber coordinates and matrix1 rows, NnzCnt indexes, values and matrix2 rows)
// and checks the total loaded words SlcCnt+2+(ColCnt+2)*(FbrCnt+NnzCnt).
module tb_mttkrp_pe;
  import fp_ref_pkg::*;
  localparam int unsigned COLS = 4;
  localparam int unsigned J_ROWS = 16, K_ROWS = 20;
  localparam int unsigned MAXS = 32, MAXF = 256, MAXN = 1024;
  localparam int unsigned RW = COLS * 32;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] slc_cnt = 0;
  always #5 clk = ~clk;

  logic sptr_req_valid, sptr_req_ready, sptr_rsp_valid;
  logic fptr_req_valid, fptr_req_ready, fptr_rsp_valid;
  logic fidx_req_valid, fidx_req_ready, fidx_rsp_valid;
  logic kidx_req_valid, kidx_req_ready, kidx_rsp_valid;
  logic val_req_valid, val_req_ready, val_rsp_valid;
  logic mat1_req_valid, mat1_req_ready, mat1_rsp_valid;
  logic mat2_req_valid, mat2_req_ready, mat2_rsp_valid;
  logic out_wr_valid, out_wr_ready;
  logic [31:0] sptr_req_addr, fptr_req_addr, fidx_req_addr, kidx_req_addr, val_req_addr;
  logic [31:0] mat1_req_addr, mat2_req_addr, out_wr_addr;
  logic [31:0] sptr_rsp_data, fptr_rsp_data, fidx_rsp_data, kidx_rsp_data, val_rsp_data;
  logic [RW-1:0] mat1_rsp_data, mat2_rsp_data, out_wr_data;

  mttkrp_pe #(.COL_CNT(COLS)) dut (.*);

  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXS + 1)) m_sptr (.clk,
    .req_valid(sptr_req_valid), .req_ready(sptr_req_ready), .req_addr(sptr_req_addr),
    .rsp_valid(sptr_rsp_valid), .rsp_data(sptr_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXF + 1)) m_fptr (.clk,
    .req_valid(fptr_req_valid), .req_ready(fptr_req_ready), .req_addr(fptr_req_addr),
    .rsp_valid(fptr_rsp_valid), .rsp_data(fptr_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXF)) m_fidx (.clk,
    .req_valid(fidx_req_valid), .req_ready(fidx_req_ready), .req_addr(fidx_req_addr),
    .rsp_valid(fidx_rsp_valid), .rsp_data(fidx_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) m_kidx (.clk,
    .req_valid(kidx_req_valid), .req_ready(kidx_req_ready), .req_addr(kidx_req_addr),
    .rsp_valid(kidx_rsp_valid), .rsp_data(kidx_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) m_val (.clk,
    .req_valid(val_req_valid), .req_ready(val_req_ready), .req_addr(val_req_addr),
    .rsp_valid(val_rsp_valid), .rsp_data(val_rsp_data));
  gmem_rd_model #(.DATA_W(RW), .DEPTH(J_ROWS)) m_mat1 (.clk,
    .req_valid(mat1_req_valid), .req_ready(mat1_req_ready), .req_addr(mat1_req_addr),
    .rsp_valid(mat1_rsp_valid), .rsp_data(mat1_rsp_data));
  gmem_rd_model #(.DATA_W(RW), .DEPTH(K_ROWS)) m_mat2 (.clk,
    .req_valid(mat2_req_valid), .req_ready(mat2_req_ready), .req_addr(mat2_req_addr),
    .rsp_valid(mat2_rsp_valid), .rsp_data(mat2_rsp_data));
  gmem_wr_model #(.DATA_W(RW), .DEPTH(MAXS)) m_out (.clk,
    .wr_valid(out_wr_valid), .wr_ready(out_wr_ready), .wr_addr(out_wr_addr),
    .wr_data(out_wr_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  int ns, nf, nnz;
  int sptr [MAXS+1];
  int fptr [MAXF+1];
  logic [31:0] fidx [MAXF];
  logic [31:0] kidx [MAXN];
  logic [31:0] vals [MAXN];
  logic [31:0] mat1 [J_ROWS][COLS];
  logic [31:0] mat2 [K_ROWS][COLS];
  logic [31:0] inb, inc;
  int c0 [8];

  task automatic run(input int shape);
    // shape 0: random; 1: one slice/fiber/nonzero; 2: one slice, many fibers
    ns  = (shape == 0) ? int'($urandom_range(1, 10)) : 1;
    nf  = 0;
    nnz = 0;
    sptr[0] = 0;
    fptr[0] = 0;
    for (int s = 0; s < ns; s++) begin
      int nfs;
      nfs = (shape == 1) ? 1 : (shape == 2) ? 12 : int'($urandom_range(1, 5));
      for (int f = 0; f < nfs; f++) begin
        int len;
        len = (shape == 1) ? 1 : int'($urandom_range(1, 5));
        fidx[nf] = 32'($urandom_range(1, J_ROWS));
        for (int e = 0; e < len; e++) begin
          kidx[nnz] = 32'($urandom_range(1, K_ROWS));
          vals[nnz] = rand_fp(4);
          nnz++;
        end
        nf++;
        fptr[nf] = nnz;
      end
      sptr[s+1] = nf;
    end
    for (int r = 0; r < int'(J_ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        mat1[r][c] = rand_fp(4);
        m_mat1.mem[r][c*32 +: 32] = mat1[r][c];
      end
    for (int r = 0; r < int'(K_ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        mat2[r][c] = rand_fp(4);
        m_mat2.mem[r][c*32 +: 32] = mat2[r][c];
      end
    for (int s = 0; s <= ns; s++) m_sptr.mem[s] = 32'(sptr[s]);
    for (int f = 0; f <= nf; f++) m_fptr.mem[f] = 32'(fptr[f]);
    for (int f = 0; f < nf; f++) m_fidx.mem[f] = fidx[f];
    for (int e = 0; e < nnz; e++) begin
      m_kidx.mem[e] = kidx[e];
      m_val.mem[e]  = vals[e];
    end
    for (int s = 0; s < int'(MAXS); s++) m_out.writes[s] = 0;
    c0[0] = m_sptr.count; c0[1] = m_fptr.count; c0[2] = m_fidx.count; c0[3] = m_kidx.count;
    c0[4] = m_val.count;  c0[5] = m_mat1.count; c0[6] = m_mat2.count; c0[7] = m_out.count;

    @(posedge clk);
    slc_cnt <= 32'(ns);
    start   <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(posedge clk);
    check(!busy, "busy after done");

    for (int s = 0; s < ns; s++) begin
      check(m_out.writes[s] == 1, $sformatf("output row %0d written %0d times", s, m_out.writes[s]));
      for (int c = 0; c < int'(COLS); c++) begin
        inb = 32'd0;
        for (int f = sptr[s]; f < sptr[s+1]; f++) begin
          inc = 32'd0;
          for (int e = fptr[f]; e < fptr[f+1]; e++)
            inc = ref_add(inc, ref_mul(vals[e], mat2[kidx[e]-1][c]));
          inb = ref_add(inb, ref_mul(inc, mat1[fidx[f]-1][c]));
        end
        check(m_out.mem[s][c*32 +: 32] == inb,
              $sformatf("V[%0d][%0d]=%h expected %h", s, c, m_out.mem[s][c*32 +: 32], inb));
      end
    end
    check(m_sptr.count - c0[0] == ns + 1, "slice pointer loads != SlcCnt+1");
    check(m_fptr.count - c0[1] == nf + 1, "fiber pointer loads != FbrCnt+1");
    check(m_fidx.count - c0[2] == nf, "fiber index loads != FbrCnt");
    check(m_kidx.count - c0[3] == nnz, "nonzero index loads != NnzCnt");
    check(m_val.count - c0[4] == nnz, "value loads != NnzCnt");
    check(m_mat1.count - c0[5] == nf, "matrix1 row loads != FbrCnt");
    check(m_mat2.count - c0[6] == nnz, "matrix2 row loads != NnzCnt");
    check(m_out.count - c0[7] == ns, "output row stores != SlcCnt");
    check((m_sptr.count - c0[0]) + (m_fptr.count - c0[1]) + (m_fidx.count - c0[2])
          + (m_kidx.count - c0[3]) + (m_val.count - c0[4])
          + int'(COLS) * ((m_mat1.count - c0[5]) + (m_mat2.count - c0[6]))
          == ns + 2 + (int'(COLS) + 2) * (nf + nnz),
          "total loaded words != SlcCnt + 2 + (ColCnt+2)*(FbrCnt+NnzCnt)");
    check(m_sptr.bad + m_fptr.bad + m_fidx.bad + m_kidx.bad + m_val.bad
          + m_mat1.bad + m_mat2.bad + m_out.bad == 0, "address out of range");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(1);
    run(2);
    for (int i = 0; i < 8; i++) run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
