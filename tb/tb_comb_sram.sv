// tb_comb_sram: self-checking testbench of comb_sram.
//
// Drives random writes with random slice enables into a 16 x 128 array with
// 32-bit slices (the data-array shape) and a 16 x 24 array with one slice
// (the tag-array shape), keeps a shadow copy, and checks after every edge
// that a combinational read of a random address returns the shadow contents
// in the same cycle, and that a write shows up at the next clock edge and not
// before.
module tb_comb_sram;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   raddr, waddr;
  logic [127:0] rdata, wdata;
  logic         wen;
  logic [3:0]   wben;

  logic [3:0]   t_raddr, t_waddr;
  logic [23:0]  t_rdata, t_wdata;
  logic         t_wen;

  comb_sram #(.WIDTH(128), .DEPTH(16), .SLICE(32)) dut (
    .clk, .raddr, .rdata, .wen, .waddr, .wben, .wdata
  );

  comb_sram #(.WIDTH(24), .DEPTH(16), .SLICE(24)) dut_tag (
    .clk, .raddr(t_raddr), .rdata(t_rdata), .wen(t_wen), .waddr(t_waddr),
    .wben(1'b1), .wdata(t_wdata)
  );

  logic [127:0] shadow   [16];
  logic [23:0]  t_shadow [16];
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wen = 1'b0; t_wen = 1'b0; raddr = '0; t_raddr = '0;
    waddr = '0; t_waddr = '0; wben = '0; wdata = '0; t_wdata = '0;
    // Fill both arrays completely first.
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      wen = 1'b1; waddr = 4'(i); wben = 4'hF;
      wdata = {$urandom, $urandom, $urandom, $urandom};
      t_wen = 1'b1; t_waddr = 4'(i); t_wdata = 24'($urandom);
      shadow[i] = wdata; t_shadow[i] = t_wdata;
    end
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      // Read check of the state written up to the last edge.
      wen = 1'b0; t_wen = 1'b0;
      raddr = 4'($urandom); t_raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++; $display("FAIL data read %0d: %h exp %h", raddr, rdata, shadow[raddr]);
      end
      checks++;
      if (t_rdata !== t_shadow[t_raddr]) begin
        failures++; $display("FAIL tag read %0d: %h exp %h", t_raddr, t_rdata, t_shadow[t_raddr]);
      end
      // Present a write; it must not be visible before the edge.
      wen = ($urandom % 4) != 0; waddr = raddr; wben = 4'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      t_wen = ($urandom % 2) != 0; t_waddr = t_raddr; t_wdata = 24'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++; $display("FAIL write visible before edge at %0d", raddr);
      end
      if (wen)
        for (int s = 0; s < 4; s++)
          if (wben[s]) shadow[waddr][32*s +: 32] = wdata[32*s +: 32];
      if (t_wen) t_shadow[t_waddr] = t_wdata;
    end
    @(negedge clk);
    wen = 1'b0; t_wen = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
