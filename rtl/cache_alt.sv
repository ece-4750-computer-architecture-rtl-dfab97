// cache_alt: two-way set-associative, write-back, write-allocate blocking cache.
//
// Same capacity (256 bytes) and line size (16 bytes) as cache_base, arranged
// as 8 sets of two ways with least-recently-used replacement, so two lines
// whose addresses share the index bits can live in the cache together. The
// interface, the protocol (one request in flight, val/rdy on all four
// channels), the request types (read, write, init) and the latencies (hit 4,
// clean miss 7, dirty miss 10 cycles plus memory delay) are those of
// cache_base. This module just joins cache_alt_ctrl and cache_alt_dpath;
// state is brought out for tracing and statistics.
module cache_alt
  import cache_msgs_pkg::*;
(
  input  logic          clk,
  input  logic          reset,

  input  logic          cachereq_val,
  output logic          cachereq_rdy,
  input  mem_req_4B_t   cachereq_msg,

  output logic          cacheresp_val,
  input  logic          cacheresp_rdy,
  output mem_resp_4B_t  cacheresp_msg,

  output logic          memreq_val,
  input  logic          memreq_rdy,
  output mem_req_16B_t  memreq_msg,

  input  logic          memresp_val,
  output logic          memresp_rdy,
  input  mem_resp_16B_t memresp_msg,

  output cache_state_e  state
);

  cache_ctrl_t ctrl;
  mem_type_e   req_type;
  logic [2:0]  req_idx;
  logic [1:0]  tag_match;

  cache_alt_ctrl u_ctrl (
    .clk, .reset,
    .cachereq_val, .cachereq_rdy, .cacheresp_val, .cacheresp_rdy,
    .memreq_val, .memreq_rdy, .memresp_val, .memresp_rdy,
    .ctrl, .req_type, .req_idx, .tag_match, .state
  );

  cache_alt_dpath u_dpath (
    .clk,
    .cachereq_msg, .cacheresp_msg, .memreq_msg, .memresp_msg,
    .ctrl, .req_type, .req_idx, .tag_match
  );

  // A response must hold steady while it waits for the sink.
  assert property (@(posedge clk) disable iff (reset)
    cacheresp_val && !cacheresp_rdy |=> cacheresp_val && $stable(cacheresp_msg));
  assert property (@(posedge clk) disable iff (reset)
    memreq_val && !memreq_rdy |=> memreq_val && $stable(memreq_msg));

endmodule
