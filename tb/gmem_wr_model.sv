// Behavioural model of the global-memory output buffer, for simulation only.
//
// Accepts a write when wr_valid and the randomly stalling wr_ready are both
// high and stores wr_data in mem[wr_addr]. count is the number of writes taken;
// writes[a] counts the writes to address a, so the testbench can check that
// every output row was written exactly once.
module gmem_wr_model #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 1024
) (
  input  logic              clk,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [31:0]       wr_addr,
  input  logic [DATA_W-1:0] wr_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [DATA_W-1:0] mem [DEPTH];
  int   writes [DEPTH];
  int   count = 0;
  int   bad   = 0;

  initial begin
    wr_ready = 1'b0;
    foreach (writes[i]) writes[i] = 0;
  end

  always @(posedge clk) begin
    if (wr_valid && wr_ready) begin
      count <= count + 1;
      if (wr_addr < DEPTH) begin
        mem[wr_addr[AW-1:0]]    <= wr_data;
        writes[wr_addr[AW-1:0]] <= writes[wr_addr[AW-1:0]] + 1;
      end else begin
        bad <= bad + 1;
      end
    end
    wr_ready <= ($urandom_range(0, 3) != 0);
  end
endmodule
