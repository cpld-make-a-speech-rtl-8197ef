// tb_descrambler: exhaustive check of the descrambler in all three modes.
// Every 8-bit value is applied; the expected byte is computed here bit by
// bit (reversal, complement, nibble exchange), along with the one-clock
// latency, the out_valid pulse and that dout holds between samples. The
// document's example 11110000 -> 00001111 is checked in every mode.
module tb_descrambler;
  import speech_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] din = '0;
  logic [7:0] dout_r, dout_i, dout_s;
  logic v_r, v_i, v_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  descrambler dut_r (.clk, .rst_n, .in_valid, .din, .out_valid(v_r), .dout(dout_r));
  descrambler #(.MODE(SCR_INVERT)) dut_i (.clk, .rst_n, .in_valid, .din, .out_valid(v_i), .dout(dout_i));
  descrambler #(.MODE(SCR_SWAP))   dut_s (.clk, .rst_n, .in_valid, .din, .out_valid(v_s), .dout(dout_s));

  function automatic logic [7:0] rev(logic [7:0] d);
    return {d[0], d[1], d[2], d[3], d[4], d[5], d[6], d[7]};
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int v = 0; v < 256; v++) begin
      din <= 8'(v); in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0; din <= ~8'(v);
      #1;
      checks++; if (!(v_r && v_i && v_s)) begin failures++; $display("FAIL out_valid missing for %0d", v); end
      check("reverse", dout_r, rev(8'(v)));
      check("invert",  dout_i, ~8'(v));
      check("swap",    dout_s, {4'(v), 4'(v >> 4)});
      @(posedge clk); #1;
      checks++; if (v_r || v_i || v_s) begin failures++; $display("FAIL out_valid stuck"); end
      check("hold", dout_r, rev(8'(v)));
    end
    // Worked example: 00001111 on the wire is the sample 11110000.
    din <= 8'b0000_1111; in_valid <= 1'b1;
    @(posedge clk); in_valid <= 1'b0; #1;
    check("example reverse", dout_r, 8'b1111_0000);
    check("example invert",  dout_i, 8'b1111_0000);
    check("example swap",    dout_s, 8'b1111_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
