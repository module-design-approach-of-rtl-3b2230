// tb_hc_receiver: checks that eight 7-bit words, first word least significant,
// are reassembled into the 56-bit message, that receive pulses for one cycle
// right after the eighth word, and that gaps between words are tolerated.
module tb_hc_receiver;
  logic clk = 0, rst = 1, vin = 0;
  logic [6:0]  din;
  logic [55:0] dout;
  logic        receive;
  int checks = 0, failures = 0;

  hc_receiver dut (.clk(clk), .rst(rst), .din_valid(vin), .datain(din), .dataout(dout),
    .receive(receive));

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
    din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int m = 0; m < 50; m++) begin
      logic [55:0] x;
      x = {$urandom, $urandom};
      for (int w = 0; w < 8; w++) begin
        din = x[7*w +: 7]; vin = 1;
        @(negedge clk);
        vin = 0;
        check(receive == (w == 7), $sformatf("receive at word %0d", w));
        if (m % 2 == 1) begin
          @(negedge clk);
          check(!receive, "receive is one cycle");
        end
      end
      check(dout === x, $sformatf("msg %0d: %h exp %h", m, dout, x));
      @(negedge clk);
      check(!receive && dout === x, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
