// tb_temp_mem: self-checking test of the temporary memory.
// Writes the top and bottom halves of a 16-word memory through the two write
// ports in the same cycles (as the copy step does), then random single and
// dual writes, and checks the read port against a shadow array.
module tb_temp_mem;
  localparam int unsigned M = 16, W = $clog2(M) + 1, AW = $clog2(M);

  logic          clk = 1'b0;
  logic          top_we = 1'b0, bot_we = 1'b0;
  logic [AW-1:0] top_addr = '0, bot_addr = '0, raddr = '0;
  logic [W-1:0]  top_wdata = '0, bot_wdata = '0, rdata;
  logic [W-1:0]  shadow [M];
  int checks = 0, failures = 0;

  temp_mem #(.M(M)) dut (.clk, .top_we, .top_addr, .top_wdata,
                         .bot_we, .bot_addr, .bot_wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check_all();
    for (int a = 0; a < int'(M); a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("FAIL addr %0d: got %0d expected %0d", a, rdata, shadow[a]);
      end
    end
  endtask

  initial begin
    // Parallel fill: top from 0 upward, bottom from M/2 upward.
    for (int i = 0; i < int'(M) / 2; i++) begin
      @(negedge clk);
      top_we = 1'b1; top_addr = AW'(i);          top_wdata = W'($urandom);
      bot_we = 1'b1; bot_addr = AW'(i + M / 2);  bot_wdata = W'($urandom);
      shadow[i] = top_wdata; shadow[i + M / 2] = bot_wdata;
    end
    @(negedge clk); top_we = 1'b0; bot_we = 1'b0;
    check_all();
    for (int it = 0; it < 100; it++) begin
      @(negedge clk);
      top_we = 1'($urandom); bot_we = 1'($urandom);
      top_addr = AW'($urandom); bot_addr = AW'($urandom);
      if (top_addr == bot_addr) bot_addr = top_addr + 1'b1;
      top_wdata = W'($urandom); bot_wdata = W'($urandom);
      if (top_we) shadow[top_addr] = top_wdata;
      if (bot_we) shadow[bot_addr] = bot_wdata;
      @(negedge clk); top_we = 1'b0; bot_we = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
