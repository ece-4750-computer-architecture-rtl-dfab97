// tb_cache_top: end-to-end testbench of cache_top at its default sizes.
//
// Both caches run side by side, each with its own cache_agent (test source,
// sink, main memory and reference model), on the same request stream; they
// differ only in the hit/miss pattern the references predict. The stream is:
// an init followed by a read hit; a refill and hits to the refilled line; a
// write miss to 0x100, which shares its index with 0x000; a read of 0x000,
// which evicts the dirty 0x100 line in the direct-mapped cache and hits in
// the two-way one; a third line of the same index (0x200), which makes the
// two-way cache replace its least recently used line; then random reads, writes and
// inits under random source, sink and memory delays. Every response is
// checked. Each mechanism must be seen at least once per cache: hit, clean
// miss, dirty miss with write-back, init, replacement of a valid line, memory
// back-pressure and sink back-pressure. The two-way cache must hit where the
// direct-mapped one conflicts (0x000 after 0x100).
module tb_cache_top;
  import cache_msgs_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  logic          base_cachereq_val, base_cachereq_rdy, base_cacheresp_val, base_cacheresp_rdy;
  logic          base_memreq_val, base_memreq_rdy, base_memresp_val, base_memresp_rdy;
  mem_req_4B_t   base_cachereq_msg;
  mem_resp_4B_t  base_cacheresp_msg;
  mem_req_16B_t  base_memreq_msg;
  mem_resp_16B_t base_memresp_msg;
  cache_state_e  base_state;
  logic          alt_cachereq_val, alt_cachereq_rdy, alt_cacheresp_val, alt_cacheresp_rdy;
  logic          alt_memreq_val, alt_memreq_rdy, alt_memresp_val, alt_memresp_rdy;
  mem_req_4B_t   alt_cachereq_msg;
  mem_resp_4B_t  alt_cacheresp_msg;
  mem_req_16B_t  alt_memreq_msg;
  mem_resp_16B_t alt_memresp_msg;
  cache_state_e  alt_state;

  cache_top dut (.*);

  cache_agent #(.WAYS(1)) base_agent (
    .clk, .reset,
    .cachereq_val(base_cachereq_val), .cachereq_rdy(base_cachereq_rdy),
    .cachereq_msg(base_cachereq_msg), .cacheresp_val(base_cacheresp_val),
    .cacheresp_rdy(base_cacheresp_rdy), .cacheresp_msg(base_cacheresp_msg),
    .memreq_val(base_memreq_val), .memreq_rdy(base_memreq_rdy), .memreq_msg(base_memreq_msg),
    .memresp_val(base_memresp_val), .memresp_rdy(base_memresp_rdy),
    .memresp_msg(base_memresp_msg)
  );

  cache_agent #(.WAYS(2)) alt_agent (
    .clk, .reset,
    .cachereq_val(alt_cachereq_val), .cachereq_rdy(alt_cachereq_rdy),
    .cachereq_msg(alt_cachereq_msg), .cacheresp_val(alt_cacheresp_val),
    .cacheresp_rdy(alt_cacheresp_rdy), .cacheresp_msg(alt_cacheresp_msg),
    .memreq_val(alt_memreq_val), .memreq_rdy(alt_memreq_rdy), .memreq_msg(alt_memreq_msg),
    .memresp_val(alt_memresp_val), .memresp_rdy(alt_memresp_rdy),
    .memresp_msg(alt_memresp_msg)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d",
             checks + base_agent.checks + alt_agent.checks,
             failures + base_agent.failures + alt_agent.failures + 1);
    $finish;
  end

  // The same stream for both caches.
  bit        conflict_hit_alt, conflict_hit_base;
  int        pre_hits_base, pre_hits_alt;

  `define RUN_STREAM(AG, CONFLICT_HIT) \
    begin \
      AG.preload(32'h0000_0000, 32'h0e5ca18d); \
      AG.preload(32'h0000_0004, 32'h00ba11ad); \
      AG.xact(MEM_INIT,  32'h0000_1000, 32'hdeadbeef); \
      AG.xact(MEM_READ,  32'h0000_1000, 32'h0); \
      AG.xact(MEM_READ,  32'h0000_0000, 32'h0); \
      AG.xact(MEM_READ,  32'h0000_0004, 32'h0); \
      AG.xact(MEM_WRITE, 32'h0000_0100, 32'h00e1de57); \
      begin int h; h = AG.n_hit; AG.xact(MEM_READ, 32'h0000_0000, 32'h0); \
            CONFLICT_HIT = (AG.n_hit != h); end \
      AG.xact(MEM_READ,  32'h0000_0200, 32'h0); \
      AG.xact(MEM_READ,  32'h0000_0000, 32'h0); \
      AG.xact(MEM_READ,  32'h0000_0100, 32'h0); \
      for (int ph = 0; ph < 3; ph++) begin \
        AG.src_delay   = (ph == 1) ? 2 : 0; \
        AG.sink_delay  = (ph >= 1) ? 2 : 0; \
        AG.mem_latency = (ph == 2) ? 5 : 0; \
        AG.mem_stall   = (ph == 2) ? 30 : 0; \
        for (int i = 0; i < 300; i++) begin \
          int unsigned r; logic [31:0] a; \
          r = $urandom_range(99, 0); \
          a = 32'(($urandom_range(39, 0) << 4) | ($urandom_range(3, 0) << 2)); \
          if (r < 3) AG.xact(MEM_INIT, a, $urandom); \
          else if (r < 50) AG.xact(MEM_WRITE, a, $urandom); \
          else AG.xact(MEM_READ, a, 32'h0); \
        end \
      end \
    end

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    fork
      `RUN_STREAM(base_agent, conflict_hit_base)
      `RUN_STREAM(alt_agent, conflict_hit_alt)
    join

    check(conflict_hit_alt,   "two-way cache holds 0x000 and 0x100 together (hit)");
    check(!conflict_hit_base, "direct-mapped cache: 0x000 conflicts with 0x100 (miss)");
    check(alt_state == ST_I && base_state == ST_I, "both caches idle at the end");
    foreach (base_agent.rm.mem[k]) check(base_agent.u_mem.read_word(k << 2) == base_agent.rm.mem[k],
                                         $sformatf("base memory word %h", k << 2));
    foreach (alt_agent.rm.mem[k]) check(alt_agent.u_mem.read_word(k << 2) == alt_agent.rm.mem[k],
                                        $sformatf("alt memory word %h", k << 2));
    `define MECH(AG, NAME, CNT) \
      check(AG.CNT > 0, $sformatf("%s: %s never happened", `"AG`", NAME)); \
      $display("%-10s %-22s %0d", `"AG`", NAME, AG.CNT);
    `MECH(base_agent, "hit", n_hit)
    `MECH(base_agent, "clean miss", n_clean_miss)
    `MECH(base_agent, "dirty miss (evict)", n_dirty_miss)
    `MECH(base_agent, "write-back", n_wb)
    `MECH(base_agent, "init", n_init)
    `MECH(base_agent, "replacement", n_replace)
    `MECH(base_agent, "memory stall", n_mem_stall)
    `MECH(base_agent, "sink stall", n_sink_stall)
    `MECH(alt_agent, "hit", n_hit)
    `MECH(alt_agent, "clean miss", n_clean_miss)
    `MECH(alt_agent, "dirty miss (evict)", n_dirty_miss)
    `MECH(alt_agent, "write-back", n_wb)
    `MECH(alt_agent, "init", n_init)
    `MECH(alt_agent, "LRU replacement", n_replace)
    `MECH(alt_agent, "memory stall", n_mem_stall)
    `MECH(alt_agent, "sink stall", n_sink_stall)
    check(base_agent.n_wb == base_agent.n_dirty_miss, "base: one write-back per dirty miss");
    check(alt_agent.n_wb == alt_agent.n_dirty_miss, "alt: one write-back per dirty miss");

    $display("TB_RESULT checks=%0d failures=%0d",
             checks + base_agent.checks + alt_agent.checks,
             failures + base_agent.failures + alt_agent.failures);
    $finish;
  end

endmodule
