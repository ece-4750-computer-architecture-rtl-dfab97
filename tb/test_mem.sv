// test_mem: behavioural main-memory model for testing the caches
// (behavioural_model, not synthesizable; testbench use only).
//
// Serves one 16-byte line request at a time on a val/rdy memreq channel and
// answers on memresp. A request is accepted when memreq_val and memreq_rdy
// are high at a clock edge; the read or write is done at once and the
// response is offered `latency` cycles after the cycle following acceptance
// (latency 0: the response is valid in the very next cycle), then held until
// memresp_rdy. While a request is outstanding, or in a cycle picked at random
// with probability stall_pct/100, memreq_rdy is low. The store holds WORDS
// 32-bit words, all zero after time 0; addresses wrap modulo its size.
// write_word/read_word/clear let a testbench preload and inspect it.
module test_mem
  import cache_msgs_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic          clk,
  input  logic          reset,
  input  int unsigned   latency,
  input  int unsigned   stall_pct,

  input  logic          memreq_val,
  output logic          memreq_rdy,
  input  mem_req_16B_t  memreq_msg,

  output logic          memresp_val,
  input  logic          memresp_rdy,
  output mem_resp_16B_t memresp_msg
);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  function automatic int unsigned widx(input logic [31:0] addr);
    return (addr >> 2) % WORDS;
  endfunction

  function automatic void write_word(input logic [31:0] addr, input logic [31:0] data);
    mem[widx(addr)] = data;
  endfunction

  function automatic void clear();
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  endfunction

  function automatic logic [31:0] read_word(input logic [31:0] addr);
    return mem[widx(addr)];
  endfunction

  logic        busy;
  logic        stall;
  int unsigned wait_cnt;
  int unsigned num_reads, num_writes;

  assign memreq_rdy = !busy && !stall;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy        <= 1'b0;
      stall       <= 1'b0;
      memresp_val <= 1'b0;
      wait_cnt    <= 0;
      num_reads   <= 0;
      num_writes  <= 0;
      memresp_msg <= '0;
    end else begin
      stall <= ($urandom % 100) < stall_pct;
      if (memreq_val && memreq_rdy) begin
        busy <= 1'b1;
        memresp_msg.msg_type <= memreq_msg.msg_type;
        memresp_msg.opaque   <= memreq_msg.opaque;
        memresp_msg.test     <= 2'd0;
        memresp_msg.len      <= memreq_msg.len;
        if (memreq_msg.msg_type == MEM_WRITE) begin
          for (int w = 0; w < 4; w++)
            mem[widx(memreq_msg.addr + 32'(4 * w))] <= memreq_msg.data[32*w +: 32];
          memresp_msg.data <= '0;
          num_writes <= num_writes + 1;
        end else begin
          for (int w = 0; w < 4; w++)
            memresp_msg.data[32*w +: 32] <= mem[widx(memreq_msg.addr + 32'(4 * w))];
          num_reads <= num_reads + 1;
        end
        wait_cnt    <= latency;
        memresp_val <= (latency == 0);
      end else if (busy && !memresp_val) begin
        if (wait_cnt <= 1) memresp_val <= 1'b1;
        wait_cnt <= wait_cnt - 1;
      end else if (memresp_val && memresp_rdy) begin
        memresp_val <= 1'b0;
        busy        <= 1'b0;
      end
    end
  end

endmodule
