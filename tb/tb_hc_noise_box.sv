// tb_hc_noise_box: checks that the noise box flips exactly one bit per valid
// word while noise_en is high, at the reported position, that the position
// is always inside the 11-bit word and reaches every bit, that words pass
// unchanged while noise_en is low, and the one-cycle latency.
module tb_hc_noise_box;
  logic clk = 0, rst = 1, noise_en = 0, vin = 0;
  logic [10:0] orgin, errout;
  logic        vout, flip;
  logic [3:0]  pos;
  int checks = 0, failures = 0;
  bit [10:0] seen;

  hc_noise_box #(.CW_W(11)) dut (.clk(clk), .rst(rst), .noise_en(noise_en), .orgin_valid(vin),
    .orgin(orgin), .errout(errout), .errout_valid(vout), .err_pos(pos), .err_flip(flip));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    orgin = '0; seen = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [10:0] w;
      w = 11'($urandom);
      noise_en = (n % 4) != 3;
      orgin = w; vin = 1;
      @(negedge clk);
      check(vout, "valid after one cycle");
      if (noise_en) begin
        check($countones(errout ^ w) == 1, $sformatf("one flip: %b -> %b", w, errout));
        check(pos < 11 && errout === (w ^ (11'd1 << pos)) && flip, "flip at err_pos");
        if (pos < 11) seen[pos] = 1'b1;
      end else begin
        check(errout === w && !flip, "pass unchanged");
      end
    end
    vin = 0;
    @(negedge clk);
    check(!vout, "valid low");
    check(&seen, $sformatf("positions reached %b", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
