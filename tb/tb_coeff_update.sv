// tb_coeff_update: self-checking test of the tap-weight register bank.
//
// Checks that reset clears every weight, that the bank holds its contents
// while load is low, and that a load copies all new weights at once and shows
// them right after the clock edge. Expected values are kept in a testbench
// copy of the bank.
module tb_coeff_update;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic signed [15:0] n_c [N];
  logic signed [15:0] c [N];
  logic signed [15:0] model [N];

  int checks = 0, failures = 0, loads = 0, holds = 0;

  coeff_update dut (.clk, .rst_n, .load, .n_c, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    for (int i = 0; i < N; i++) check(c[i] == model[i], $sformatf("c[%0d] %0d exp %0d", i, c[i], model[i]));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin n_c[i] = 16'($urandom); model[i] = '0; end
    #12;
    compare();                          // in reset
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      load = ($urandom_range(0, 1) == 1);
      for (int i = 0; i < N; i++) n_c[i] = 16'($urandom);
      @(posedge clk);
      if (load) begin
        for (int i = 0; i < N; i++) model[i] = n_c[i];
        loads++;
      end else holds++;
      #1 compare();
      if (t == 200) begin
        rst_n = 1'b0;
        for (int i = 0; i < N; i++) model[i] = '0;
        #1 compare();
        @(negedge clk) rst_n = 1'b1;
      end
    end
    check(loads > 0 && holds > 0, "loads and holds both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
