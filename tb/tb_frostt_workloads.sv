// Workload testbench: scaled-down tensors with the shapes of the FROSTT
// datasets vast-3D and nell-2, run through the accelerator top at its default
// parameters (16 columns, 32768-row on-chip TTM matrix).
//
// The matrix dimensions are the datasets' real mode sizes. TTM uses mode 2:
// 2 rows for vast-3D, 28,818 rows for nell-2. MTTKRP uses mode 1 for matrix1
// (11,374 / 9,184 rows) and mode 2 for matrix2. Only the counts of slices,
// fibers and nonzeros are scaled down. The per-slice and per-fiber densities
// keep the datasets' averages. vast-3D has one nonzero per fiber and about 157
// fibers per slice. nell-2 has about 228 nonzeros per fiber and 28 fibers per
// slice. Each run checks every output value bit-exactly and the total words
// loaded against the closed-form count. It prints the cycles per nonzero and
// the words loaded per multiply-add, which give the arithmetic intensity the
// hardware reaches on that shape.
module tb_frostt_workloads;
  import fp_ref_pkg::*;
  localparam int unsigned COLS = 16, RW = COLS * 32;
  localparam int unsigned K_ROWS = 32768;
  localparam int unsigned J_ROWS = 11374, K2_ROWS = 28818;
  localparam int unsigned MAXF = 512, MAXN = 16384, MAXS = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ttm_start = 0, ttm_busy, ttm_done;
  logic [31:0] ttm_fbr_cnt = 0, ttm_mat_rows = 0;
  logic ttm_fptr_req_valid, ttm_fptr_req_ready, ttm_fptr_rsp_valid;
  logic ttm_kidx_req_valid, ttm_kidx_req_ready, ttm_kidx_rsp_valid;
  logic ttm_val_req_valid, ttm_val_req_ready, ttm_val_rsp_valid;
  logic ttm_mat_req_valid, ttm_mat_req_ready, ttm_mat_rsp_valid;
  logic ttm_out_wr_valid, ttm_out_wr_ready;
  logic [31:0] ttm_fptr_req_addr, ttm_kidx_req_addr, ttm_val_req_addr, ttm_mat_req_addr, ttm_out_wr_addr;
  logic [31:0] ttm_fptr_rsp_data, ttm_kidx_rsp_data, ttm_val_rsp_data;
  logic [RW-1:0] ttm_mat_rsp_data, ttm_out_wr_data;

  logic mt_start = 0, mt_busy, mt_done;
  logic [31:0] mt_slc_cnt = 0;
  logic mt_sptr_req_valid, mt_sptr_req_ready, mt_sptr_rsp_valid;
  logic mt_fptr_req_valid, mt_fptr_req_ready, mt_fptr_rsp_valid;
  logic mt_fidx_req_valid, mt_fidx_req_ready, mt_fidx_rsp_valid;
  logic mt_kidx_req_valid, mt_kidx_req_ready, mt_kidx_rsp_valid;
  logic mt_val_req_valid, mt_val_req_ready, mt_val_rsp_valid;
  logic mt_mat1_req_valid, mt_mat1_req_ready, mt_mat1_rsp_valid;
  logic mt_mat2_req_valid, mt_mat2_req_ready, mt_mat2_rsp_valid;
  logic mt_out_wr_valid, mt_out_wr_ready;
  logic [31:0] mt_sptr_req_addr, mt_fptr_req_addr, mt_fidx_req_addr, mt_kidx_req_addr, mt_val_req_addr;
  logic [31:0] mt_mat1_req_addr, mt_mat2_req_addr, mt_out_wr_addr;
  logic [31:0] mt_sptr_rsp_data, mt_fptr_rsp_data, mt_fidx_rsp_data, mt_kidx_rsp_data, mt_val_rsp_data;
  logic [RW-1:0] mt_mat1_rsp_data, mt_mat2_rsp_data, mt_out_wr_data;

  sparse_tensor_fpga_top dut (.*);

  // TTM global memory
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXF + 1)) t_fptr (.clk,
    .req_valid(ttm_fptr_req_valid), .req_ready(ttm_fptr_req_ready), .req_addr(ttm_fptr_req_addr),
    .rsp_valid(ttm_fptr_rsp_valid), .rsp_data(ttm_fptr_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) t_kidx (.clk,
    .req_valid(ttm_kidx_req_valid), .req_ready(ttm_kidx_req_ready), .req_addr(ttm_kidx_req_addr),
    .rsp_valid(ttm_kidx_rsp_valid), .rsp_data(ttm_kidx_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) t_val (.clk,
    .req_valid(ttm_val_req_valid), .req_ready(ttm_val_req_ready), .req_addr(ttm_val_req_addr),
    .rsp_valid(ttm_val_rsp_valid), .rsp_data(ttm_val_rsp_data));
  gmem_rd_model #(.DATA_W(RW), .DEPTH(K_ROWS)) t_mat (.clk,
    .req_valid(ttm_mat_req_valid), .req_ready(ttm_mat_req_ready), .req_addr(ttm_mat_req_addr),
    .rsp_valid(ttm_mat_rsp_valid), .rsp_data(ttm_mat_rsp_data));
  gmem_wr_model #(.DATA_W(RW), .DEPTH(MAXF)) t_out (.clk,
    .wr_valid(ttm_out_wr_valid), .wr_ready(ttm_out_wr_ready), .wr_addr(ttm_out_wr_addr),
    .wr_data(ttm_out_wr_data));

  // MTTKRP global memory
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXS + 1)) m_sptr (.clk,
    .req_valid(mt_sptr_req_valid), .req_ready(mt_sptr_req_ready), .req_addr(mt_sptr_req_addr),
    .rsp_valid(mt_sptr_rsp_valid), .rsp_data(mt_sptr_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXF + 1)) m_fptr (.clk,
    .req_valid(mt_fptr_req_valid), .req_ready(mt_fptr_req_ready), .req_addr(mt_fptr_req_addr),
    .rsp_valid(mt_fptr_rsp_valid), .rsp_data(mt_fptr_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXF)) m_fidx (.clk,
    .req_valid(mt_fidx_req_valid), .req_ready(mt_fidx_req_ready), .req_addr(mt_fidx_req_addr),
    .rsp_valid(mt_fidx_rsp_valid), .rsp_data(mt_fidx_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) m_kidx (.clk,
    .req_valid(mt_kidx_req_valid), .req_ready(mt_kidx_req_ready), .req_addr(mt_kidx_req_addr),
    .rsp_valid(mt_kidx_rsp_valid), .rsp_data(mt_kidx_rsp_data));
  gmem_rd_model #(.DATA_W(32), .DEPTH(MAXN)) m_val (.clk,
    .req_valid(mt_val_req_valid), .req_ready(mt_val_req_ready), .req_addr(mt_val_req_addr),
    .rsp_valid(mt_val_rsp_valid), .rsp_data(mt_val_rsp_data));
  gmem_rd_model #(.DATA_W(RW), .DEPTH(J_ROWS)) m_mat1 (.clk,
    .req_valid(mt_mat1_req_valid), .req_ready(mt_mat1_req_ready), .req_addr(mt_mat1_req_addr),
    .rsp_valid(mt_mat1_rsp_valid), .rsp_data(mt_mat1_rsp_data));
  gmem_rd_model #(.DATA_W(RW), .DEPTH(K2_ROWS)) m_mat2 (.clk,
    .req_valid(mt_mat2_req_valid), .req_ready(mt_mat2_req_ready), .req_addr(mt_mat2_req_addr),
    .rsp_valid(mt_mat2_rsp_valid), .rsp_data(mt_mat2_rsp_data));
  gmem_wr_model #(.DATA_W(RW), .DEPTH(MAXS)) m_out (.clk,
    .wr_valid(mt_out_wr_valid), .wr_ready(mt_out_wr_ready), .wr_addr(mt_out_wr_addr),
    .wr_data(mt_out_wr_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  int t_nf, t_nnz;
  int t_fptr_a [MAXF+1];
  logic [31:0] t_kidx_a [MAXN];
  logic [31:0] t_vals [MAXN];
  logic [31:0] t_acc;
  int tc [5];
  longint cyc0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic ttm_run(input string name, input int rows, input int nf, input int nnz_per_fbr);
    t_nf = nf;
    t_nnz = 0;
    t_fptr_a[0] = 0;
    for (int r = 0; r < rows; r++) begin
      logic [RW-1:0] w;
      for (int c = 0; c < int'(COLS); c++) w[c*32 +: 32] = rand_fp(4);
      t_mat.mem[r] = w;
    end
    for (int f = 0; f < nf; f++) begin
      for (int e = 0; e < nnz_per_fbr; e++) begin
        t_kidx_a[t_nnz] = 32'($urandom_range(1, rows));
        t_vals[t_nnz]   = rand_fp(4);
        t_kidx.mem[t_nnz] = t_kidx_a[t_nnz];
        t_val.mem[t_nnz]  = t_vals[t_nnz];
        t_nnz++;
      end
      t_fptr_a[f+1] = t_nnz;
    end
    for (int f = 0; f <= nf; f++) t_fptr.mem[f] = 32'(t_fptr_a[f]);
    tc[0] = t_fptr.count; tc[1] = t_kidx.count; tc[2] = t_val.count; tc[3] = t_mat.count; tc[4] = t_out.count;
    @(posedge clk);
    ttm_fbr_cnt  <= 32'(nf);
    ttm_mat_rows <= 32'(rows);
    ttm_start    <= 1'b1;
    cyc0 = cycle;
    @(posedge clk);
    ttm_start <= 1'b0;
    @(posedge clk);
    while (!ttm_done) @(posedge clk);
    for (int f = 0; f < nf; f++)
      for (int c = 0; c < int'(COLS); c++) begin
        t_acc = 32'd0;
        for (int e = t_fptr_a[f]; e < t_fptr_a[f+1]; e++)
          t_acc = ref_add(t_acc, ref_mul(t_vals[e], t_mat.mem[int'(t_kidx_a[e]) - 1][c*32 +: 32]));
        check(t_out.mem[f][c*32 +: 32] == t_acc,
              $sformatf("%s O[%0d][%0d]=%h expected %h", name, f, c, t_out.mem[f][c*32 +: 32], t_acc));
      end
    check((t_fptr.count - tc[0]) + (t_kidx.count - tc[1]) + (t_val.count - tc[2])
          + int'(COLS) * (t_mat.count - tc[3]) == nf + 1 + 2 * t_nnz + rows * int'(COLS),
          $sformatf("%s: loaded words != FbrCnt+1 + 2*NnzCnt + rows*ColCnt", name));
    check(t_out.count - tc[4] == nf, $sformatf("%s: output stores", name));
    $display("%s: FbrCnt=%0d NnzCnt=%0d matrix rows=%0d cycles=%0d (matrix copy included) cycles/nonzero=%0.2f",
             name, nf, t_nnz, rows, cycle - cyc0, real'(cycle - cyc0) / real'(t_nnz));
  endtask

  int m_nf, m_nnz;
  int m_sptr_a [MAXS+1];
  int m_fptr_a [MAXF+1];
  logic [31:0] m_fidx_a [MAXF];
  logic [31:0] m_kidx_a [MAXN];
  logic [31:0] m_vals [MAXN];
  logic [31:0] inb, inc;
  int mc [8];
  int loaded;

  task automatic mt_run(input string name, input int j_rows, input int k_rows,
                        input int ns, input int fbr_per_slc, input int nnz_per_fbr);
    m_nf = 0; m_nnz = 0;
    m_sptr_a[0] = 0; m_fptr_a[0] = 0;
    for (int r = 0; r < j_rows; r++)
      for (int c = 0; c < int'(COLS); c++) m_mat1.mem[r][c*32 +: 32] = rand_fp(4);
    for (int r = 0; r < k_rows; r++)
      for (int c = 0; c < int'(COLS); c++) m_mat2.mem[r][c*32 +: 32] = rand_fp(4);
    for (int s = 0; s < ns; s++) begin
      for (int f = 0; f < fbr_per_slc; f++) begin
        m_fidx_a[m_nf] = 32'($urandom_range(1, j_rows));
        m_fidx.mem[m_nf] = m_fidx_a[m_nf];
        for (int e = 0; e < nnz_per_fbr; e++) begin
          m_kidx_a[m_nnz] = 32'($urandom_range(1, k_rows));
          m_vals[m_nnz]   = rand_fp(4);
          m_kidx.mem[m_nnz] = m_kidx_a[m_nnz];
          m_val.mem[m_nnz]  = m_vals[m_nnz];
          m_nnz++;
        end
        m_nf++;
        m_fptr_a[m_nf] = m_nnz;
      end
      m_sptr_a[s+1] = m_nf;
    end
    for (int s = 0; s <= ns; s++) m_sptr.mem[s] = 32'(m_sptr_a[s]);
    for (int f = 0; f <= m_nf; f++) m_fptr.mem[f] = 32'(m_fptr_a[f]);
    mc[0] = m_sptr.count; mc[1] = m_fptr.count; mc[2] = m_fidx.count; mc[3] = m_kidx.count;
    mc[4] = m_val.count;  mc[5] = m_mat1.count; mc[6] = m_mat2.count; mc[7] = m_out.count;
    @(posedge clk);
    mt_slc_cnt <= 32'(ns);
    mt_start   <= 1'b1;
    cyc0 = cycle;
    @(posedge clk);
    mt_start <= 1'b0;
    @(posedge clk);
    while (!mt_done) @(posedge clk);
    for (int s = 0; s < ns; s++)
      for (int c = 0; c < int'(COLS); c++) begin
        inb = 32'd0;
        for (int f = m_sptr_a[s]; f < m_sptr_a[s+1]; f++) begin
          inc = 32'd0;
          for (int e = m_fptr_a[f]; e < m_fptr_a[f+1]; e++)
            inc = ref_add(inc, ref_mul(m_vals[e], m_mat2.mem[m_kidx_a[e]-1][c*32 +: 32]));
          inb = ref_add(inb, ref_mul(inc, m_mat1.mem[m_fidx_a[f]-1][c*32 +: 32]));
        end
        check(m_out.mem[s][c*32 +: 32] == inb,
              $sformatf("%s V[%0d][%0d]=%h expected %h", name, s, c, m_out.mem[s][c*32 +: 32], inb));
      end
    loaded = (m_sptr.count - mc[0]) + (m_fptr.count - mc[1]) + (m_fidx.count - mc[2])
           + (m_kidx.count - mc[3]) + (m_val.count - mc[4])
           + int'(COLS) * ((m_mat1.count - mc[5]) + (m_mat2.count - mc[6]));
    check(loaded == ns + 2 + (int'(COLS) + 2) * (m_nf + m_nnz),
          $sformatf("%s: loaded words != SlcCnt + 2 + (ColCnt+2)*(FbrCnt+NnzCnt)", name));
    check(m_out.count - mc[7] == ns, $sformatf("%s: output stores", name));
    $display("%s: SlcCnt=%0d FbrCnt=%0d NnzCnt=%0d cycles=%0d cycles/(fiber+nonzero)=%0.2f AI=%0.4f flop/byte",
             name, ns, m_nf, m_nnz, cycle - cyc0, real'(cycle - cyc0) / real'(m_nf + m_nnz),
             real'(2 * int'(COLS) * (m_nf + m_nnz)) / (4.0 * real'(loaded + ns * int'(COLS))));
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      begin
        ttm_run("TTM vast-3D shape", 2, 400, 1);
        ttm_run("TTM nell-2 shape", 28818, 8, 228);
      end
      begin
        mt_run("MTTKRP vast-3D shape", 11374, 2, 3, 157, 1);
        mt_run("MTTKRP nell-2 shape", 9184, 28818, 2, 28, 228);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
