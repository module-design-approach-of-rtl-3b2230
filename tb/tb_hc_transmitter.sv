// tb_hc_transmitter: checks that a 56-bit message leaves as eight 7-bit words,
// least significant first, one per cycle in cycles 1..8 after send, with den
// high only for those cycles, and that send is ignored while busy.
module tb_hc_transmitter;
  logic clk = 0, rst = 1, send = 0;
  logic [55:0] msg;
  logic [6:0]  dout;
  logic        den, busy;
  int checks = 0, failures = 0;

  hc_transmitter dut (.clk(clk), .rst(rst), .send(send), .datain(msg), .dataout(dout),
    .den(den), .busy(busy));

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
    msg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk);
    check(!den && !busy, "idle after reset");
    for (int m = 0; m < 50; m++) begin
      logic [55:0] x;
      x = {$urandom, $urandom};
      msg = x; send = 1;
      @(negedge clk);
      msg = ~x;              // a second send while busy must be ignored
      send = (m % 2) == 0;
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        send = 0;
        check(den && dout === x[7*w +: 7], $sformatf("msg %0d word %0d: %b exp %b", m, w, dout, x[7*w +: 7]));
        check(busy == (w < 7), "busy");
      end
      @(negedge clk);
      check(!den, "den low after eight words");
      repeat (m % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
