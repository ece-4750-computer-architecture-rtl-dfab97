// tb_cache_trace: replays two short directed tests on the direct-mapped
// cache and compares its FSM state in every cycle with the expected trace.
//
// Test 1: init 0x1000 with deadbeef, then read it back (a hit):
//   I TC IN W | I TC RD W
// Test 2 (memory holds 0e5ca18d at 0x0 and 00ba11ad at 0x4): read 0x0
// (refill), read 0x0 and 0x4 (hits), write 00e1de57 to 0x100 (same index,
// clean line: refill then write), read 0x100 (hit):
//   I TC RR RW RU RD W | I TC RD W | I TC RD W | I TC RR RW RU WD W | I TC RD W
// The source offers each request in the cycle after the previous response,
// the sink and the memory never stall, and the memory answers in the cycle
// after a request. Each cycle prints a line trace: cycle, request accepted,
// state, memory request/response, and response sent. Checks: every state,
// every response's type, opaque, test field and read data, and the cycle of
// the last response.
module tb_cache_trace;
  import cache_msgs_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  logic          cachereq_val, cachereq_rdy, cacheresp_val, cacheresp_rdy;
  logic          memreq_val, memreq_rdy, memresp_val, memresp_rdy;
  mem_req_4B_t   cachereq_msg;
  mem_resp_4B_t  cacheresp_msg;
  mem_req_16B_t  memreq_msg;
  mem_resp_16B_t memresp_msg;
  cache_state_e  state;

  cache_base dut (.*);

  test_mem u_mem (
    .clk, .reset, .latency(0), .stall_pct(0),
    .memreq_val, .memreq_rdy, .memreq_msg,
    .memresp_val, .memresp_rdy, .memresp_msg
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    mem_type_e   t;
    logic [31:0] addr;
    logic [31:0] data;
    logic [1:0]  exp_test;
    logic [31:0] exp_data;
  } op_t;

  // Request/response pairs of the two tests
  op_t ops [7] = '{
    '{MEM_INIT,  32'h0000_1000, 32'hdeadbeef, 2'd0, 32'h0},
    '{MEM_READ,  32'h0000_1000, 32'h0,        2'd1, 32'hdeadbeef},
    '{MEM_READ,  32'h0000_0000, 32'h0,        2'd0, 32'h0e5ca18d},
    '{MEM_READ,  32'h0000_0000, 32'h0,        2'd1, 32'h0e5ca18d},
    '{MEM_READ,  32'h0000_0004, 32'h0,        2'd1, 32'h00ba11ad},
    '{MEM_WRITE, 32'h0000_0100, 32'h00e1de57, 2'd0, 32'h0},
    '{MEM_READ,  32'h0000_0100, 32'h0,        2'd1, 32'h00e1de57}
  };

  cache_state_e exp_states [] = '{
    ST_I, ST_TC, ST_IN, ST_W,  ST_I, ST_TC, ST_RD, ST_W,
    ST_I, ST_TC, ST_RR, ST_RW, ST_RU, ST_RD, ST_W,
    ST_I, ST_TC, ST_RD, ST_W,  ST_I, ST_TC, ST_RD, ST_W,
    ST_I, ST_TC, ST_RR, ST_RW, ST_RU, ST_WD, ST_W,
    ST_I, ST_TC, ST_RD, ST_W
  };

  function automatic string sname(cache_state_e s);
    case (s)
      ST_I: return "I "; ST_TC: return "TC"; ST_IN: return "IN"; ST_RD: return "RD";
      ST_WD: return "WD"; ST_EP: return "EP"; ST_ER: return "ER"; ST_EW: return "EW";
      ST_RR: return "RR"; ST_RW: return "RW"; ST_RU: return "RU"; ST_W: return "W ";
      default: return "??";
    endcase
  endfunction

  function automatic string tname(mem_type_e t);
    case (t)
      MEM_READ: return "rd"; MEM_WRITE: return "wr"; MEM_INIT: return "in";
      default: return "??";
    endcase
  endfunction

  // Source: offer the next request whenever the cache is idle.
  int next_op = 0;
  int resp_idx = 0;
  int cyc = 0;
  int last_resp_cyc = 0;
  always_comb begin
    cachereq_val = !reset && (next_op < 7);
    cachereq_msg = '0;
    if (next_op < 7)
      cachereq_msg = '{msg_type: ops[next_op].t, opaque: 8'(next_op), addr: ops[next_op].addr,
                       len: 2'd0, data: ops[next_op].data};
  end
  assign cacheresp_rdy = 1'b1;

  always @(posedge clk) begin
    if (!reset) begin
      string req_s, resp_s, mreq_s, mresp_s;
      req_s = ""; resp_s = ""; mreq_s = ""; mresp_s = "";
      if (cachereq_val && cachereq_rdy)
        req_s = $sformatf("%s:%02h:%08h:%08h", tname(cachereq_msg.msg_type),
                          cachereq_msg.opaque, cachereq_msg.addr, cachereq_msg.data);
      if (memreq_val && memreq_rdy)
        mreq_s = $sformatf("%s:%02h:%08h", tname(memreq_msg.msg_type), memreq_msg.opaque,
                           memreq_msg.addr);
      if (memresp_val && memresp_rdy)
        mresp_s = $sformatf("%s:%02h:%08h", tname(memresp_msg.msg_type), memresp_msg.opaque,
                            memresp_msg.data[31:0]);
      if (cacheresp_val && cacheresp_rdy)
        resp_s = $sformatf("%s:%02h:%0d:%08h", tname(cacheresp_msg.msg_type),
                           cacheresp_msg.opaque, cacheresp_msg.test, cacheresp_msg.data);
      $display("%3d: %-30s (%s) %-22s %-22s %s", cyc, req_s, sname(state), mreq_s, mresp_s, resp_s);

      if (cyc < exp_states.size()) begin
        checks++;
        if (state != exp_states[cyc]) begin
          failures++;
          $display("FAIL cycle %0d: state %s exp %s", cyc, sname(state), sname(exp_states[cyc]));
        end
      end
      if (cachereq_val && cachereq_rdy) next_op <= next_op + 1;
      if (cacheresp_val && cacheresp_rdy) begin
        checks++;
        if (cacheresp_msg.msg_type != ops[resp_idx].t || cacheresp_msg.opaque != 8'(resp_idx) ||
            cacheresp_msg.test != ops[resp_idx].exp_test ||
            cacheresp_msg.data != ops[resp_idx].exp_data) begin
          failures++;
          $display("FAIL response %0d", resp_idx);
        end
        resp_idx <= resp_idx + 1;
        last_resp_cyc <= cyc;
      end
      cyc <= cyc + 1;
    end
  end

  initial begin
    u_mem.write_word(32'h0000_0000, 32'h0e5ca18d);
    u_mem.write_word(32'h0000_0004, 32'h00ba11ad);
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    wait (resp_idx == 7);
    repeat (2) @(posedge clk);
    checks++;
    if (last_resp_cyc != exp_states.size() - 1) begin
      failures++;
      $display("FAIL last response in cycle %0d exp %0d", last_resp_cyc, exp_states.size() - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
