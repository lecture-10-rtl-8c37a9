// mem_dual: dual-ported combinational memory for the single-cycle processor.
//
// WORDS 32-bit words, byte-addressed (address bits [1:0] ignored, index
// wraps modulo WORDS). Each port reads combinationally: the response data
// is the word at the request address in the same cycle, whether or not the
// request is valid. A valid write request stores its data on the rising
// clock edge. If both ports write the same word in one cycle, port 1 wins.
// The size is this design's choice.
module mem_dual
  import parc_pkg::*;
#(
  parameter int WORDS = 1024,
  localparam int IW   = $clog2(WORDS)
) (
  input  logic      clk,
  input  logic      req0_val,
  input  mem_req_t  req0,
  output mem_resp_t resp0,
  input  logic      req1_val,
  input  mem_req_t  req1,
  output mem_resp_t resp1
);

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req0_val && req0.typ == MEM_WRITE) mem[req0.addr[IW+1:2]] <= req0.data;
    if (req1_val && req1.typ == MEM_WRITE) mem[req1.addr[IW+1:2]] <= req1.data;
  end

  assign resp0.data = mem[req0.addr[IW+1:2]];
  assign resp1.data = mem[req1.addr[IW+1:2]];

endmodule
