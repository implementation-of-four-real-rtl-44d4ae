// tb_iq_buffer: self-checking test of the IQ sample buffer.
// Sends random I/Q word pairs with random gaps, checks that Data_Valid pulses
// exactly once per pair, one cycle after the Q word, that both buffers hold the
// pair, that the read port returns I, Q and the packed pair, and that a Q word
// with no I word before it is ignored.
module tb_iq_buffer;
  import sasrats_pkg::*;

  logic clk = 0, rst_n = 1;
  logic ddc_strobe = 0, ddc_is_i = 0;
  logic signed [15:0] ddc_data = '0;
  logic data_valid;
  iq_t iq_out;
  logic [1:0] rd_addr = '0;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;

  iq_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic is_i, input logic [15:0] d);
    ddc_strobe <= 1; ddc_is_i <= is_i; ddc_data <= d;
    @(posedge clk);
    ddc_strobe <= 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] vi, vq;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Lone Q word: nothing happens.
    send(0, 16'h1234);
    #1 check(!data_valid, "lone Q word must not raise data_valid");
    for (int t = 0; t < 300; t++) begin
      vi = 16'($urandom); vq = 16'($urandom);
      send(1, vi);
      #1 check(!data_valid, "no data_valid after I word");
      @(negedge clk);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      send(0, vq);
      #1;
      check(data_valid, "data_valid one cycle after Q word");
      check(iq_out.i == vi && iq_out.q == vq, "parallel output holds pair");
      rd_addr = 2'd0; #1 check(rd_data == {{16{vi[15]}}, vi}, "read I");
      rd_addr = 2'd1; #1 check(rd_data == {{16{vq[15]}}, vq}, "read Q");
      rd_addr = 2'd2; #1 check(rd_data == {vi, vq}, "read IQ pair");
      @(posedge clk); #1;
      check(!data_valid, "data_valid lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
