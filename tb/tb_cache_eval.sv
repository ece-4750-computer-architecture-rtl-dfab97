// tb_cache_eval: the three loop access patterns on both caches.
//
// Each pattern runs on freshly reset caches with a main memory that answers
// 20 cycles late, as in the evaluation set-up; every read is checked against
// the reference model, and the number of misses is checked against the
// count worked out by hand for each organisation:
//   loop-1d  a[i], i = 0..99: 100 word reads over 25 lines, each line missed
//            once: 25 misses in both caches.
//   loop-2d  the same array read five times. 25 lines do not fit in 16.
//            Direct-mapped: the first pass misses 25 times, each later pass
//            misses the 9 lines of index 0..8 and the 9 lines of index 0..8
//            that displaced them (18): 25 + 4*18 = 97. Two-way LRU: each set
//            cycles through three (set 0: four) lines, so LRU always
//            evicts the next line needed: all 125 reads of lines miss.
//   loop-3d  five times over j = 0..1, k = 0..7: address j*256 + k*16 holds
//            j*64 + k*4. The two lines of each k share an index:
//            direct-mapped misses all 80; two-way misses only the first 16.
// The array of loop-1d/2d is assumed to start at address 0, with a[i] at
// 4*i holding 3*i + 1. Cycles, misses and average latency are printed.
module tb_cache_eval;
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
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d",
             checks + base_agent.checks + alt_agent.checks,
             failures + base_agent.failures + alt_agent.failures + 1);
    $finish;
  end

  `define PATTERN(AG, P) \
    begin \
      if (P == 2) begin \
        for (int i = 0; i < 2; i++) for (int j = 0; j < 8; j++) \
          AG.preload(32'(i*256 + j*16), 32'(i*64 + j*4)); \
        for (int r = 0; r < 5; r++) for (int j = 0; j < 2; j++) for (int k = 0; k < 8; k++) \
          AG.xact(MEM_READ, 32'(j*256 + k*16), 32'h0); \
      end else begin \
        for (int i = 0; i < 100; i++) AG.preload(32'(4*i), 32'(3*i + 1)); \
        for (int r = 0; r < ((P == 0) ? 1 : 5); r++) for (int i = 0; i < 100; i++) \
          AG.xact(MEM_READ, 32'(4*i), 32'h0); \
      end \
    end

  int exp_base [3] = '{25, 97, 80};
  int exp_alt  [3] = '{25, 125, 16};
  string pname [3] = '{"loop-1d", "loop-2d", "loop-3d"};

  initial begin
    for (int p = 0; p < 3; p++) begin
      reset = 1'b1;
      base_agent.restart();
      alt_agent.restart();
      base_agent.mem_latency = 20;
      alt_agent.mem_latency  = 20;
      repeat (3) @(negedge clk);
      reset = 1'b0;
      @(negedge clk);
      begin
        int unsigned c0, cb, ca;
        c0 = base_agent.cycle;
        fork
          begin `PATTERN(base_agent, p) cb = base_agent.cycle - c0; end
          begin `PATTERN(alt_agent, p)  ca = alt_agent.cycle - c0;  end
        join
        check(base_agent.n_clean_miss + base_agent.n_dirty_miss == exp_base[p],
              $sformatf("%s direct-mapped misses %0d exp %0d", pname[p],
                        base_agent.n_clean_miss + base_agent.n_dirty_miss, exp_base[p]));
        check(alt_agent.n_clean_miss + alt_agent.n_dirty_miss == exp_alt[p],
              $sformatf("%s two-way misses %0d exp %0d", pname[p],
                        alt_agent.n_clean_miss + alt_agent.n_dirty_miss, exp_alt[p]));
        $display("%-8s direct-mapped: accesses %0d misses %0d cycles %0d AMAL %0.2f",
                 pname[p], base_agent.n_access, base_agent.n_clean_miss + base_agent.n_dirty_miss,
                 cb, real'(base_agent.lat_sum) / base_agent.n_access);
        $display("%-8s two-way      : accesses %0d misses %0d cycles %0d AMAL %0.2f",
                 pname[p], alt_agent.n_access, alt_agent.n_clean_miss + alt_agent.n_dirty_miss,
                 ca, real'(alt_agent.lat_sum) / alt_agent.n_access);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d",
             checks + base_agent.checks + alt_agent.checks,
             failures + base_agent.failures + alt_agent.failures);
    $finish;
  end

endmodule
