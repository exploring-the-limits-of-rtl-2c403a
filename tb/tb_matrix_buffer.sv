// Self-checking testbench of the on-chip matrix buffer: fills every row with
// a pattern derived from its address, reads rows back in random order (one per
// cycle, data the cycle after rd_en), overwrites some rows and reads again.
module tb_matrix_buffer;
  localparam int unsigned COLS = 4, ROWS = 64, AW = 6;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0, last_addr;
  logic [COLS*32-1:0] wr_data = 0, rd_data;
  logic [COLS*32-1:0] shadow [ROWS];
  int checks = 0, failures = 0;

  matrix_buffer #(.COLS(COLS), .ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [COLS*32-1:0] pattern(input int r, input int salt);
    logic [COLS*32-1:0] p;
    for (int c = 0; c < int'(COLS); c++) p[c*32 +: 32] = 32'(r * 1000003 + c * 7919 + salt);
    return p;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(input int n);
    for (int i = 0; i < n; i++) begin
      rd_en   <= 1'b1;
      rd_addr <= AW'($urandom_range(0, ROWS - 1));
      @(posedge clk);
      last_addr = rd_addr;
      rd_en <= 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== shadow[last_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d read %h expected %h", last_addr, rd_data, shadow[last_addr]);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int r = 0; r < int'(ROWS); r++) begin
      wr_en   <= 1'b1;
      wr_addr <= AW'(r);
      wr_data <= pattern(r, 1);
      shadow[r] = pattern(r, 1);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    read_all(200);
    for (int i = 0; i < 20; i++) begin
      int r;
      r = int'($urandom_range(0, ROWS - 1));
      wr_en   <= 1'b1;
      wr_addr <= AW'(r);
      wr_data <= pattern(r, 2 + i);
      shadow[r] = pattern(r, 2 + i);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    read_all(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
