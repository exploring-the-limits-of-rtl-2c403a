// One outstanding load to a global-memory read port.
//
// A processing element pulses issue with an address; the slot raises req_valid
// and holds req_addr until the memory takes the request (req_valid && req_ready),
// then waits for the single response, stores its data and raises full. The
// owner reads data and pulses consume to free the slot; consume and issue in
// the same cycle start the next load at once. Responses return in order, at
// least one cycle after the request was taken, and are always accepted.
// Interface: clk, rst_n (active-low synchronous); issue, addr, consume from the
// owner; full, data to the owner; req_valid/req_ready/req_addr and
// rsp_valid/rsp_data to memory. This request/response handshake is the
// design's own choice of how loads reach global memory.
module load_slot
  import sparse_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              issue,
  input  addr_t             addr,
  input  logic              consume,
  output logic              full,
  output logic [DATA_W-1:0] data,
  output logic              req_valid,
  input  logic              req_ready,
  output addr_t             req_addr,
  input  logic              rsp_valid,
  input  logic [DATA_W-1:0] rsp_data
);

  typedef enum logic [1:0] {L_IDLE, L_REQ, L_WAIT, L_FULL} slot_state_t;
  slot_state_t state;

  assign req_valid = (state == L_REQ);
  assign full      = (state == L_FULL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= L_IDLE;
      req_addr <= '0;
      data     <= '0;
    end else begin
      unique case (state)
        L_IDLE: if (issue) begin
          state    <= L_REQ;
          req_addr <= addr;
        end
        L_REQ:  if (req_ready) state <= L_WAIT;
        L_WAIT: if (rsp_valid) begin
          state <= L_FULL;
          data  <= rsp_data;
        end
        L_FULL: if (issue) begin
          state    <= L_REQ;
          req_addr <= addr;
        end else if (consume) begin
          state <= L_IDLE;
        end
      endcase
    end
  end

  // Handshake rules: a response only answers an accepted request, and the
  // owner only issues into a free slot.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!rsp_valid || state == L_WAIT)
        else $error("load_slot: response without an outstanding request");
      assert (!issue || state == L_IDLE || (state == L_FULL && consume))
        else $error("load_slot: issue into a busy slot");
    end
  end

endmodule
