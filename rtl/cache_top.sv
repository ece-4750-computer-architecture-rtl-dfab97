// cache_top: the two blocking cache designs side by side.
//
// The direct-mapped cache (cache_base) and the two-way set-associative cache
// (cache_alt) are alternative organisations of the same 256-byte, 16-byte-line,
// write-back, write-allocate cache with the same interface. Each is placed
// here with its own four val/rdy channels brought out under a base_ or alt_
// prefix: cachereq (word requests from the processor), cacheresp (word
// responses), memreq (line requests to main memory) and memresp (line
// responses), plus the FSM state for tracing. They share clock and reset and
// nothing else; the processor and the main memory are outside this module.
module cache_top
  import cache_msgs_pkg::*;
(
  input  logic          clk,
  input  logic          reset,

  // direct-mapped cache
  input  logic          base_cachereq_val,
  output logic          base_cachereq_rdy,
  input  mem_req_4B_t   base_cachereq_msg,
  output logic          base_cacheresp_val,
  input  logic          base_cacheresp_rdy,
  output mem_resp_4B_t  base_cacheresp_msg,
  output logic          base_memreq_val,
  input  logic          base_memreq_rdy,
  output mem_req_16B_t  base_memreq_msg,
  input  logic          base_memresp_val,
  output logic          base_memresp_rdy,
  input  mem_resp_16B_t base_memresp_msg,
  output cache_state_e  base_state,
  // two-way set-associative cache
  input  logic          alt_cachereq_val,
  output logic          alt_cachereq_rdy,
  input  mem_req_4B_t   alt_cachereq_msg,
  output logic          alt_cacheresp_val,
  input  logic          alt_cacheresp_rdy,
  output mem_resp_4B_t  alt_cacheresp_msg,
  output logic          alt_memreq_val,
  input  logic          alt_memreq_rdy,
  output mem_req_16B_t  alt_memreq_msg,
  input  logic          alt_memresp_val,
  output logic          alt_memresp_rdy,
  input  mem_resp_16B_t alt_memresp_msg,
  output cache_state_e  alt_state
);

  cache_base u_base (
    .clk           (clk),
    .reset         (reset),
    .cachereq_val  (base_cachereq_val),
    .cachereq_rdy  (base_cachereq_rdy),
    .cachereq_msg  (base_cachereq_msg),
    .cacheresp_val (base_cacheresp_val),
    .cacheresp_rdy (base_cacheresp_rdy),
    .cacheresp_msg (base_cacheresp_msg),
    .memreq_val    (base_memreq_val),
    .memreq_rdy    (base_memreq_rdy),
    .memreq_msg    (base_memreq_msg),
    .memresp_val   (base_memresp_val),
    .memresp_rdy   (base_memresp_rdy),
    .memresp_msg   (base_memresp_msg),
    .state         (base_state)
  );

  cache_alt u_alt (
    .clk           (clk),
    .reset         (reset),
    .cachereq_val  (alt_cachereq_val),
    .cachereq_rdy  (alt_cachereq_rdy),
    .cachereq_msg  (alt_cachereq_msg),
    .cacheresp_val (alt_cacheresp_val),
    .cacheresp_rdy (alt_cacheresp_rdy),
    .cacheresp_msg (alt_cacheresp_msg),
    .memreq_val    (alt_memreq_val),
    .memreq_rdy    (alt_memreq_rdy),
    .memreq_msg    (alt_memreq_msg),
    .memresp_val   (alt_memresp_val),
    .memresp_rdy   (alt_memresp_rdy),
    .memresp_msg   (alt_memresp_msg),
    .state         (alt_state)
  );
endmodule
