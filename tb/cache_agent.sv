// cache_agent: test source, test sink and main memory for one cache
// (testbench use only).
//
// Connects to a cache's four val/rdy channels. It owns a test_mem for the
// memreq/memresp side and a cache_ref model of the cache under test
// (WAYS = 1 direct-mapped, 2 two-way). xact() issues one request after a
// random source delay of 0..src_delay cycles, takes the response with a
// random sink delay, and checks type, opaque, read data and the hit/miss
// test field against the model. With no delays anywhere it also checks the
// cycle count: 3 cycles from the accepting edge to the response for a hit or
// an init, 6 for a clean miss, 9 for a dirty miss. It counts hits, clean
// misses, dirty misses, inits, replacements of a valid line, memory and sink
// back-pressure cycles and the request-to-response cycles, for the caller to
// check and report.
module cache_agent
  import cache_msgs_pkg::*;
  import cache_ref_pkg::*;
#(
  parameter int unsigned WAYS = 1
) (
  input  logic          clk,
  input  logic          reset,

  output logic          cachereq_val,
  input  logic          cachereq_rdy,
  output mem_req_4B_t   cachereq_msg,
  input  logic          cacheresp_val,
  output logic          cacheresp_rdy,
  input  mem_resp_4B_t  cacheresp_msg,

  input  logic          memreq_val,
  output logic          memreq_rdy,
  input  mem_req_16B_t  memreq_msg,
  output logic          memresp_val,
  input  logic          memresp_rdy,
  output mem_resp_16B_t memresp_msg
);

  int unsigned mem_latency = 0;
  int unsigned mem_stall   = 0;
  int unsigned src_delay   = 0;
  int unsigned sink_delay  = 0;

  test_mem u_mem (
    .clk, .reset, .latency(mem_latency), .stall_pct(mem_stall),
    .memreq_val, .memreq_rdy, .memreq_msg,
    .memresp_val, .memresp_rdy, .memresp_msg
  );

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int n_hit = 0, n_clean_miss = 0, n_dirty_miss = 0, n_init = 0, n_replace = 0;
  int n_mem_stall = 0, n_sink_stall = 0, n_wb = 0, n_access = 0;
  longint lat_sum = 0;
  always @(negedge clk) begin
    if (!reset && memreq_val && !memreq_rdy) n_mem_stall++;
    if (!reset && cacheresp_val && !cacheresp_rdy) n_sink_stall++;
    if (!reset && memreq_val && memreq_rdy && memreq_msg.msg_type == MEM_WRITE) n_wb++;
  end

  cache_ref    rm;
  logic [7:0]  opq = 8'd0;

  initial begin
    rm = new(WAYS);
    cachereq_val  = 1'b0;
    cachereq_msg  = '0;
    cacheresp_rdy = 1'b0;
  end

  function automatic void clear_stats();
    n_hit = 0; n_clean_miss = 0; n_dirty_miss = 0; n_init = 0; n_replace = 0;
    n_access = 0; lat_sum = 0;
  endfunction

  // Start a new run: empty memory, a fresh reference model and zero counts.
  // The caller resets the cache at the same time.
  function automatic void restart();
    u_mem.clear();
    rm = new(WAYS);
    clear_stats();
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (%0d-way) @%0d: %s", WAYS, cycle, what);
    end
  endtask

  task automatic preload(input logic [31:0] addr, input logic [31:0] data);
    u_mem.write_word(addr, data);
    rm.mem_wr(addr, data);
  endtask

  task automatic xact(input mem_type_e t, input logic [31:0] addr, input logic [31:0] data);
    ref_result_t exp;
    int unsigned acc_cyc, resp_cyc, exp_lat;
    mem_resp_4B_t got;
    bit was_full;
    was_full = 1'b1;
    for (int w = 0; w < int'(WAYS); w++)
      if (!rm.valid[w * (16 / WAYS) + ((addr >> 4) % (16 / WAYS))]) was_full = 1'b0;
    exp = rm.access(int'(t), addr, data);
    repeat ($urandom_range(src_delay, 0)) @(negedge clk);
    cachereq_val = 1'b1;
    cachereq_msg = '{msg_type: t, opaque: opq, addr: addr, len: 2'd0, data: data};
    while (!cachereq_rdy) @(negedge clk);
    acc_cyc = cycle;
    @(negedge clk);
    cachereq_val = 1'b0;
    cachereq_msg = '0;
    forever begin
      cacheresp_rdy = ($urandom_range(sink_delay, 0) == 0);
      if (cacheresp_val && cacheresp_rdy) break;
      @(negedge clk);
    end
    resp_cyc = cycle;
    got = cacheresp_msg;
    @(negedge clk);
    cacheresp_rdy = 1'b0;

    n_access++;
    lat_sum += longint'(resp_cyc - acc_cyc + 1);
    if (t == MEM_INIT) n_init++;
    else if (exp.hit) n_hit++;
    else begin
      if (exp.evict) n_dirty_miss++; else n_clean_miss++;
      if (was_full) n_replace++;
    end

    check(got.msg_type == t, $sformatf("type %0d exp %0d", got.msg_type, t));
    check(got.opaque == opq, $sformatf("opaque %h exp %h", got.opaque, opq));
    check(got.test == {1'b0, exp.hit}, $sformatf("%s %h: test %0d exp %0d",
          t.name(), addr, got.test, exp.hit));
    if (t == MEM_READ)
      check(got.data == exp.rdata, $sformatf("read %h: data %h exp %h", addr, got.data, exp.rdata));
    if (src_delay == 0 && sink_delay == 0 && mem_latency == 0 && mem_stall == 0) begin
      exp_lat = 3 + (exp.refill ? 3 : 0) + (exp.evict ? 3 : 0);
      check(resp_cyc - acc_cyc == exp_lat, $sformatf("%s %h: latency %0d exp %0d",
            t.name(), addr, resp_cyc - acc_cyc, exp_lat));
    end
    opq = opq + 8'd1;
  endtask

endmodule
