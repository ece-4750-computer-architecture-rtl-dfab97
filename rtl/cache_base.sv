// cache_base: direct-mapped, write-back, write-allocate blocking cache.
//
// 256 bytes in 16 lines of 16 bytes. A word request arrives on the cachereq
// val/rdy channel and is answered on cacheresp; misses fetch (and, for a
// dirty victim, first write back) whole lines over memreq/memresp. Only one
// request is in flight: cachereq_rdy is high only while the cache is idle.
// Requests are read, write or init; init writes the word into the line its
// index selects, marks it valid and clean and never touches main memory (a
// test aid). Latency: four cycles from acceptance to response on a hit (the
// response is valid three cycles after the accepting edge), seven on a clean
// miss and ten on a dirty miss, plus the memory's own delay. Only whole-word
// accesses are supported. This module just joins cache_base_ctrl and
// cache_base_dpath; state is brought out for tracing and statistics.
module cache_base
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
  logic [3:0]  req_idx;
  logic        tag_match;

  cache_base_ctrl u_ctrl (
    .clk, .reset,
    .cachereq_val, .cachereq_rdy, .cacheresp_val, .cacheresp_rdy,
    .memreq_val, .memreq_rdy, .memresp_val, .memresp_rdy,
    .ctrl, .req_type, .req_idx, .tag_match, .state
  );

  cache_base_dpath u_dpath (
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
