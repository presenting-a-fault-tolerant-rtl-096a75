// tb_secded_encoder: exhaustive check of the SECDED encoder over all 256
// data words against the reference model, plus the code's minimum distance
// of 4 between the codewords of words that differ in one bit.
module tb_secded_encoder;
  import ft_tb_pkg::*;

  logic [7:0] data;
  logic [4:0] check;
  int checks = 0, failures = 0;

  secded_encoder #(.DATA_W(8)) dut (.data, .check);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) begin
      data = 8'(d);
      #1;
      checks++;
      if (check !== ref_check(8'(d))) begin
        failures++;
        $display("FAIL data=%02h check=%02h expected=%02h", d, check, ref_check(8'(d)));
      end
      // one data bit flipped changes at least 3 check bits
      for (int b = 0; b < 8; b++) begin
        checks++;
        if ($countones(ref_check(8'(d)) ^ ref_check(8'(d) ^ (8'd1 << b))) < 3) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
