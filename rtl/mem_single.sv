// mem_single: single-ported combinational memory for the FSM processor.
//
// WORDS 32-bit words, byte-addressed (address bits [1:0] ignored, index
// wraps modulo WORDS). The response data is the word at the request address
// in the same cycle (read is combinational, always driven). A valid write
// request stores its data on the rising clock edge. The size is this
// design's choice.
module mem_single
  import parc_pkg::*;
#(
  parameter int WORDS = 1024,
  localparam int IW   = $clog2(WORDS)
) (
  input  logic      clk,
  input  logic      req_val,
  input  mem_req_t  req,
  output mem_resp_t resp
);

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req_val && req.typ == MEM_WRITE) mem[req.addr[IW+1:2]] <= req.data;
  end

  assign resp.data = mem[req.addr[IW+1:2]];

endmodule
