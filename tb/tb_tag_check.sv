// tb_tag_check: equal and unequal tag pairs (including single-bit
// differences); auth_ok / auth_fail must follow one cycle after in_valid.
module tb_tag_check;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [63:0] tag_calc, tag_mem;
  logic out_valid, auth_ok, auth_fail;
  int checks = 0, failures = 0;

  tag_check dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit same;
    tag_calc = '0; tag_mem = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      tag_calc = {$urandom, $urandom};
      case (t % 3)
        0: tag_mem = tag_calc;
        1: tag_mem = tag_calc ^ (64'd1 << $urandom_range(0, 63));
        default: tag_mem = {$urandom, $urandom};
      endcase
      same = (t % 3 == 0);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || auth_ok !== same || auth_fail !== !same) begin
        failures++;
        $display("FAIL t=%0d v=%b ok=%b fail=%b same=%b", t, out_valid, auth_ok, auth_fail, same);
      end
      @(negedge clk);
      checks++;
      if (out_valid || auth_ok || auth_fail) begin
        failures++;
        $display("FAIL result without request");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
