// tb_csi_regs: self-checking test of the channel state registers.
// Random writes go to the shadow bank and must not reach h until commit; after
// commit h must equal a model of the shadow bank (including a write in the
// commit cycle), updated must pulse once, and reset must clear everything.
module tb_csi_regs;
  import sasrats_pkg::*;
  localparam int NUM_CH = 8;

  logic clk = 0, rst_n = 1;
  logic wr_en = 0, commit = 0;
  logic [2:0] wr_addr = '0;
  h_t wr_data = '0;
  h_t h [NUM_CH];
  logic updated;
  int checks = 0, failures = 0;

  h_t shadow_m [NUM_CH];
  h_t active_m [NUM_CH];

  csi_regs #(.NUM_CH(NUM_CH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NUM_CH; n++) begin shadow_m[n] = '0; active_m[n] = '0; end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int n = 0; n < NUM_CH; n++) check(h[n] == '0, "reset clears h");
    for (int t = 0; t < 2000; t++) begin
      wr_en   = ($urandom_range(0, 2) != 0);
      wr_addr = 3'($urandom);
      wr_data = '{i: 16'($urandom), q: 16'($urandom)};
      commit  = ($urandom_range(0, 9) == 0);
      @(posedge clk); #1;
      if (wr_en) shadow_m[wr_addr] = wr_data;
      if (commit) for (int n = 0; n < NUM_CH; n++) active_m[n] = shadow_m[n];
      check(updated == commit, "updated follows commit");
      for (int n = 0; n < NUM_CH; n++)
        check(h[n] == active_m[n], $sformatf("h[%0d] after cycle %0d", n, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
