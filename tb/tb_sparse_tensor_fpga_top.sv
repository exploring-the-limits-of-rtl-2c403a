// End-to-end testbench of the accelerator top at its default parameters
// (16 columns for both methods, 32768-row on-chip TTM matrix).
//
// The TTM and MTTKRP processing elements run side by side on random CSF
// tensors against randomly stalling global-memory models. Every output value
// is checked bit-exactly against a reference with the same order of rounded
// operations, and the loads of each buffer are counted against the
// closed-form counts. The last TTM operation fills the whole on-chip matrix.
// Each mechanism of the design is counted and must occur at least once:
// on-chip matrix preload, reuse of a row already on chip, TTM fiber stores,
// MTTKRP fiber reductions (inC into inB), slice stores, read-request stalls
// and store stalls.
module tb_sparse_tensor_fpga_top;
  import fp_ref_pkg::*;
  localparam int unsigned COLS = 16, RW = COLS * 32;
  localparam int unsigned K_ROWS = 32768;
  localparam int unsigned J_ROWS = 64, K2_ROWS = 64;
  localparam int unsigned MAXF = 64, MAXN = 512, MAXS = 16;

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

  // mechanism counters
  int n_preload = 0, n_row_reuse = 0, n_ttm_fiber = 0, n_mt_reduce = 0, n_mt_slice = 0;
  int n_load_stall = 0, n_store_stall = 0;
  bit row_seen [K_ROWS];
  always @(posedge clk) begin
    if (ttm_mat_rsp_valid) n_preload++;
    if (ttm_kidx_rsp_valid) begin
      if (row_seen[ttm_kidx_rsp_data[14:0] - 15'd1]) n_row_reuse++;
      row_seen[ttm_kidx_rsp_data[14:0] - 15'd1] = 1'b1;
    end
    if (ttm_out_wr_valid && ttm_out_wr_ready) n_ttm_fiber++;
    if (mt_mat1_rsp_valid) n_mt_reduce++;
    if (mt_out_wr_valid && mt_out_wr_ready) n_mt_slice++;
    if ((ttm_kidx_req_valid && !ttm_kidx_req_ready) || (mt_mat2_req_valid && !mt_mat2_req_ready))
      n_load_stall++;
    if ((ttm_out_wr_valid && !ttm_out_wr_ready) || (mt_out_wr_valid && !mt_out_wr_ready))
      n_store_stall++;
  end

  // ---------------- TTM ----------------
  int t_nf, t_nnz, t_rows;
  int t_fptr_a [MAXF+1];
  logic [31:0] t_kidx_a [MAXN];
  logic [31:0] t_vals [MAXN];
  logic [31:0] t_acc;
  int tc0, tc1, tc2, tc3, tc4;

  function automatic logic [31:0] mat_entry(input int r, input int c);
    return t_mat.mem[r][c*32 +: 32];
  endfunction

  task automatic ttm_run(input int rows);
    t_rows = rows;
    t_nf   = int'($urandom_range(8, 24));
    t_nnz  = 0;
    t_fptr_a[0] = 0;
    for (int r = 0; r < rows; r++) begin
      logic [RW-1:0] w;
      for (int c = 0; c < int'(COLS); c++) w[c*32 +: 32] = rand_fp(4);
      t_mat.mem[r] = w;
      row_seen[r] = 1'b0;
    end
    for (int f = 0; f < t_nf; f++) begin
      int len;
      len = int'($urandom_range(1, 8));
      for (int e = 0; e < len; e++) begin
        t_kidx_a[t_nnz] = 32'($urandom_range(1, (t_nnz % 3 == 0) ? 4 : rows));
        t_vals[t_nnz]   = rand_fp(4);
        t_kidx.mem[t_nnz] = t_kidx_a[t_nnz];
        t_val.mem[t_nnz]  = t_vals[t_nnz];
        t_nnz++;
      end
      t_fptr_a[f+1] = t_nnz;
    end
    for (int f = 0; f <= t_nf; f++) t_fptr.mem[f] = 32'(t_fptr_a[f]);
    for (int f = 0; f < int'(MAXF); f++) t_out.writes[f] = 0;
    tc0 = t_fptr.count; tc1 = t_kidx.count; tc2 = t_val.count; tc3 = t_mat.count; tc4 = t_out.count;
    @(posedge clk);
    ttm_fbr_cnt  <= 32'(t_nf);
    ttm_mat_rows <= 32'(rows);
    ttm_start    <= 1'b1;
    @(posedge clk);
    ttm_start <= 1'b0;
    @(posedge clk);
    while (!ttm_done) @(posedge clk);
    for (int f = 0; f < t_nf; f++) begin
      check(t_out.writes[f] == 1, $sformatf("TTM row %0d written %0d times", f, t_out.writes[f]));
      for (int c = 0; c < int'(COLS); c++) begin
        t_acc = 32'd0;
        for (int e = t_fptr_a[f]; e < t_fptr_a[f+1]; e++)
          t_acc = ref_add(t_acc, ref_mul(t_vals[e], mat_entry(int'(t_kidx_a[e]) - 1, c)));
        check(t_out.mem[f][c*32 +: 32] == t_acc,
              $sformatf("TTM O[%0d][%0d]=%h expected %h", f, c, t_out.mem[f][c*32 +: 32], t_acc));
      end
    end
    check(t_fptr.count - tc0 == t_nf + 1, "TTM fiber pointer loads");
    check(t_kidx.count - tc1 == t_nnz && t_val.count - tc2 == t_nnz, "TTM index/value loads");
    check(t_mat.count - tc3 == rows, "TTM on-chip matrix: each row loaded once");
    check(t_out.count - tc4 == t_nf, "TTM output stores");
  endtask

  // ---------------- MTTKRP ----------------
  int m_ns, m_nf, m_nnz;
  int m_sptr_a [MAXS+1];
  int m_fptr_a [MAXF+1];
  logic [31:0] m_fidx_a [MAXF];
  logic [31:0] m_kidx_a [MAXN];
  logic [31:0] m_vals [MAXN];
  logic [31:0] inb, inc;
  int mc [8];

  task automatic mt_run();
    m_ns = int'($urandom_range(3, 8));
    m_nf = 0; m_nnz = 0;
    m_sptr_a[0] = 0; m_fptr_a[0] = 0;
    for (int r = 0; r < int'(J_ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) m_mat1.mem[r][c*32 +: 32] = rand_fp(4);
    for (int r = 0; r < int'(K2_ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) m_mat2.mem[r][c*32 +: 32] = rand_fp(4);
    for (int s = 0; s < m_ns; s++) begin
      int nfs;
      nfs = int'($urandom_range(1, 5));
      for (int f = 0; f < nfs; f++) begin
        int len;
        len = int'($urandom_range(1, 5));
        m_fidx_a[m_nf] = 32'($urandom_range(1, J_ROWS));
        m_fidx.mem[m_nf] = m_fidx_a[m_nf];
        for (int e = 0; e < len; e++) begin
          m_kidx_a[m_nnz] = 32'($urandom_range(1, K2_ROWS));
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
    for (int s = 0; s <= m_ns; s++) m_sptr.mem[s] = 32'(m_sptr_a[s]);
    for (int f = 0; f <= m_nf; f++) m_fptr.mem[f] = 32'(m_fptr_a[f]);
    for (int s = 0; s < int'(MAXS); s++) m_out.writes[s] = 0;
    mc[0] = m_sptr.count; mc[1] = m_fptr.count; mc[2] = m_fidx.count; mc[3] = m_kidx.count;
    mc[4] = m_val.count;  mc[5] = m_mat1.count; mc[6] = m_mat2.count; mc[7] = m_out.count;
    @(posedge clk);
    mt_slc_cnt <= 32'(m_ns);
    mt_start   <= 1'b1;
    @(posedge clk);
    mt_start <= 1'b0;
    @(posedge clk);
    while (!mt_done) @(posedge clk);
    for (int s = 0; s < m_ns; s++) begin
      check(m_out.writes[s] == 1, $sformatf("MTTKRP row %0d written %0d times", s, m_out.writes[s]));
      for (int c = 0; c < int'(COLS); c++) begin
        inb = 32'd0;
        for (int f = m_sptr_a[s]; f < m_sptr_a[s+1]; f++) begin
          inc = 32'd0;
          for (int e = m_fptr_a[f]; e < m_fptr_a[f+1]; e++)
            inc = ref_add(inc, ref_mul(m_vals[e], m_mat2.mem[m_kidx_a[e]-1][c*32 +: 32]));
          inb = ref_add(inb, ref_mul(inc, m_mat1.mem[m_fidx_a[f]-1][c*32 +: 32]));
        end
        check(m_out.mem[s][c*32 +: 32] == inb,
              $sformatf("MTTKRP V[%0d][%0d]=%h expected %h", s, c, m_out.mem[s][c*32 +: 32], inb));
      end
    end
    check((m_sptr.count - mc[0]) + (m_fptr.count - mc[1]) + (m_fidx.count - mc[2])
          + (m_kidx.count - mc[3]) + (m_val.count - mc[4])
          + int'(COLS) * ((m_mat1.count - mc[5]) + (m_mat2.count - mc[6]))
          == m_ns + 2 + (int'(COLS) + 2) * (m_nf + m_nnz), "MTTKRP total loaded words");
    check(m_out.count - mc[7] == m_ns, "MTTKRP output stores");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
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
        ttm_run(64);
        ttm_run(K_ROWS);
      end
      begin
        for (int i = 0; i < 4; i++) mt_run();
      end
    join
    check(n_preload > 0,     "on-chip matrix preload never happened");
    check(n_row_reuse > 0,   "no matrix row was reused from the on-chip buffer");
    check(n_ttm_fiber > 0,   "no TTM fiber was stored");
    check(n_mt_reduce > 0,   "no MTTKRP fiber reduction happened");
    check(n_mt_slice > 0,    "no MTTKRP slice was stored");
    check(n_load_stall > 0,  "no load request stalled");
    check(n_store_stall > 0, "no store stalled");
    check(t_fptr.bad + t_kidx.bad + t_val.bad + t_mat.bad + t_out.bad + m_sptr.bad + m_fptr.bad
          + m_fidx.bad + m_kidx.bad + m_val.bad + m_mat1.bad + m_mat2.bad + m_out.bad == 0,
          "address out of range");
    $display("mechanisms: preload_rows=%0d row_reuse=%0d ttm_fibers=%0d mttkrp_reductions=%0d mttkrp_slices=%0d load_stalls=%0d store_stalls=%0d",
             n_preload, n_row_reuse, n_ttm_fiber, n_mt_reduce, n_mt_slice, n_load_stall, n_store_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
