// tb_rx_cpld: drives the receiver chip's sclk/sdata from a task and checks
// both stations. A frame to receiver 1's address must update dout1 only, one
// to receiver 2's address dout2 only, a broadcast frame both, and a frame to
// any other address neither. The byte on the wire is the scrambled sample;
// dout must carry the bit-reversed byte (00001111 on the wire gives
// 11110000) and hold it until that station's next frame.
module tb_rx_cpld;
  import speech_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b1, sdata = 1'b1;
  logic [7:0] dout1, dout2;
  logic dout1_valid, dout2_valid;
  int checks = 0, failures = 0;
  int upd1 = 0, upd2 = 0;
  int q = 4;

  always #5 clk = ~clk;

  rx_cpld dut (.clk, .rst_n, .sclk, .sdata, .dout1, .dout2, .dout1_valid, .dout2_valid);

  always @(posedge clk) begin
    if (rst_n && dout1_valid) upd1++;
    if (rst_n && dout2_valid) upd2++;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic logic [7:0] rev(logic [7:0] d);
    return {d[0], d[1], d[2], d[3], d[4], d[5], d[6], d[7]};
  endfunction

  task automatic wait_q();
    repeat (q) @(posedge clk);
  endtask

  task automatic bus_bit(logic b);
    sdata <= b; wait_q();
    sclk <= 1'b1; wait_q(); wait_q();
    sclk <= 1'b0; wait_q();
  endtask

  task automatic frame(logic [6:0] a, logic [7:0] d);
    sclk <= 1'b1; sdata <= 1'b1; wait_q();
    sdata <= 1'b0; wait_q(); wait_q();
    sclk <= 1'b0; wait_q();
    for (int i = 6; i >= 0; i--) bus_bit(a[i]);
    bus_bit(1'b0);
    bus_bit(1'b1);
    for (int i = 7; i >= 0; i--) bus_bit(d[i]);
    bus_bit(1'b1);
    sdata <= 1'b0; wait_q();
    sclk <= 1'b1; wait_q();
    sdata <= 1'b1; wait_q(); wait_q();
    repeat (8) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp1, exp2, w;
    int u1, u2, kind;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    exp1 = 8'h00; exp2 = 8'h00;
    for (int n = 0; n < 48; n++) begin
      q = $urandom_range(2, 5);
      w = (n == 0) ? 8'b0000_1111 : 8'($urandom);
      kind = n % 4;
      u1 = upd1; u2 = upd2;
      case (kind)
        0: begin frame(ADDR_RX1, w); exp1 = rev(w); end
        1: begin frame(ADDR_RX2, w); exp2 = rev(w); end
        2: begin frame(ADDR_BROADCAST, w); exp1 = rev(w); exp2 = rev(w); end
        default: frame(7'h7F & ~ADDR_RX1 & ~ADDR_RX2 | 7'h20, w);
      endcase
      if (n == 0) begin
        checks++;
        if (dout1 !== 8'b1111_0000) fail("worked example: 00001111 not restored to 11110000");
      end
      checks++;
      if (upd1 != u1 + ((kind == 0 || kind == 2) ? 1 : 0)) fail($sformatf("receiver 1 updates wrong for kind %0d", kind));
      checks++;
      if (upd2 != u2 + ((kind == 1 || kind == 2) ? 1 : 0)) fail($sformatf("receiver 2 updates wrong for kind %0d", kind));
      checks++;
      if (dout1 !== exp1) fail($sformatf("dout1 %b expected %b", dout1, exp1));
      checks++;
      if (dout2 !== exp2) fail($sformatf("dout2 %b expected %b", dout2, exp2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
