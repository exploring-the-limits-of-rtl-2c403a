// Behavioural model of one global-memory read buffer (board DRAM behind the
// FPGA's load unit), for simulation only.
//
// Holds DEPTH words of DATA_W bits in mem, which the testbench fills by
// hierarchical reference. req_ready is random (about one cycle in four stalls);
// a taken request is answered with mem[addr] after 1 to MAX_LAT cycles. One
// request may be outstanding at a time, which is all the processing elements
// use. count is the number of requests taken; an address outside the buffer
// counts as an error in bad.
module gmem_rd_model #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned MAX_LAT = 4
) (
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [31:0]       req_addr,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [DATA_W-1:0] mem [DEPTH];
  int   count = 0;
  int   bad   = 0;
  int   wait_cnt = 0;
  logic pending = 1'b0;
  logic [31:0] addr_q = '0;

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (req_valid && req_ready) begin
      count    <= count + 1;
      pending  <= 1'b1;
      addr_q   <= req_addr;
      wait_cnt <= int'($urandom_range(0, MAX_LAT - 1));
      if (req_addr >= DEPTH) bad <= bad + 1;
      req_ready <= 1'b0;
    end else if (pending) begin
      if (wait_cnt == 0) begin
        pending   <= 1'b0;
        rsp_valid <= 1'b1;
        rsp_data  <= (addr_q < DEPTH) ? mem[addr_q[AW-1:0]] : '0;
      end else begin
        wait_cnt <= wait_cnt - 1;
      end
      req_ready <= 1'b0;
    end else begin
      req_ready <= ($urandom_range(0, 3) != 0);
    end
  end
endmodule
