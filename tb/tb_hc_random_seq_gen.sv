// tb_hc_random_seq_gen: checks the noise box's pseudo-random sequence.
// The sequence is compared step by step with a bit-level model of the
// x^16+x^14+x^13+x^11+1 Galois register, must hold while step is low, must
// never reach zero, and must return to the seed after exactly 65535 steps.
module tb_hc_random_seq_gen;
  logic clk = 0, rst = 1, step = 0;
  logic [15:0] value;
  logic [15:0] model;
  int checks = 0, failures = 0;
  int period;

  hc_random_seq_gen #(.SEED(16'hACE1)) dut (.clk(clk), .rst(rst), .step(step), .value(value));

  always #5 clk = ~clk;

  function automatic logic [15:0] next(logic [15:0] s);
    logic [15:0] n;
    logic fb;
    fb = s[0];
    for (int b = 0; b < 15; b++) n[b] = s[b+1];
    n[15] = fb;
    n[13] = s[14] ^ fb;
    n[12] = s[13] ^ fb;
    n[10] = s[11] ^ fb;
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(value === 16'hACE1, "seed after reset");
    model = 16'hACE1;
    step = 1;
    period = 0;
    do begin
      @(negedge clk);
      model = next(model);
      period++;
      if (period < 2000 || value != model) check(value === model, $sformatf("step %0d value=%h model=%h", period, value, model));
      if (value == 0) check(0, "zero state");
    end while (value != 16'hACE1 && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    step = 0;
    repeat (3) @(negedge clk);
    check(value === 16'hACE1, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
