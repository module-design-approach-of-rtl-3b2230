// tb_ihc_system: end-to-end test of the five-stage link at its default size.
// Random 56-bit messages are sent with the noise box on (one random bit of
// every 11-bit code word flipped) and off. Each message must come out of the
// receiver unchanged, with receive 12 cycles after send; every word must be
// flagged corrected when noise is on and clean when it is off. Flips of data
// bits and of check bits must both occur.
module tb_ihc_system;
  logic clk = 0, rst = 1, send = 0, noise_en = 0;
  logic [55:0] din, dout;
  logic        receive, busy, wvalid, wcor, wunc;
  logic [3:0]  wst;
  int checks = 0, failures = 0;
  int n_data_fix = 0, n_check_fix = 0, n_clean = 0, n_msgs = 0;

  ihc_system dut (.clk(clk), .rst(rst), .send(send), .datain(din), .noise_en(noise_en),
    .dataout(dout), .receive(receive), .busy(busy), .word_valid(wvalid), .word_status(wst),
    .word_corrected(wcor), .word_uncorrectable(wunc));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // per-word flags, sampled as each decoded word is handed to the receiver
  always @(negedge clk) begin
    if (!rst && wvalid) begin
      if (noise_en) begin
        check(wcor && !wunc, $sformatf("word not corrected, status %b", wst));
        if (wst[3] == 1'b0 && wst[2:0] != 0) n_data_fix++;
        else n_check_fix++;
      end else begin
        check(!wcor && !wunc && wst == 0, "clean word flagged");
        n_clean++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int m = 0; m < 40; m++) begin
      logic [55:0] x;
      int cyc;
      x = {$urandom, $urandom};
      noise_en = (m % 5) != 4;
      din = x; send = 1;
      @(negedge clk);
      send = 0;
      cyc = 1;
      while (!receive && cyc < 50) begin
        @(negedge clk);
        cyc++;
      end
      check(receive, "receive seen");
      // cyc counts from the falling edge before the rising edge that samples send
      check(cyc - 1 == 12, $sformatf("latency %0d cycles", cyc - 1));
      check(dout === x, $sformatf("msg %0d out %h exp %h", m, dout, x));
      n_msgs++;
      @(negedge clk);
    end
    check(n_data_fix > 0, "data bit corrected");
    check(n_check_fix > 0, "check bit flip handled");
    check(n_clean > 0, "clean words");
    $display("messages %0d, data-bit fixes %0d, check-bit fixes %0d, clean words %0d",
             n_msgs, n_data_fix, n_check_fix, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
