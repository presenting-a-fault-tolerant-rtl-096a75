// tb_ft_codec: checks the Decoder & Encoder unit for every 8-bit word in
// four situations: no check bits arrived, clean check bits, every single
// bit error and a sample of double bit errors. Expected outputs come from
// the reference code model.
module tb_ft_codec;
  import ft_tb_pkg::*;

  logic [7:0] data, enc_data;
  logic [4:0] check, enc_check;
  logic check_present, corrected, error_resist, use_codec;
  int checks = 0, failures = 0;

  ft_codec dut (.*);

  task automatic chk(bit c, string what, int d);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s data=%02h", what, d);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] cw, bad;
    for (int d = 0; d < 256; d++) begin
      // no check bits: data taken as is, check bits computed
      data = 8'(d); check = 5'($urandom); check_present = 0;
      #1;
      chk(use_codec && !error_resist && !corrected && enc_data == 8'(d) &&
          enc_check == ref_check(8'(d)), "no check bits", d);
      // clean check bits: pass through (MUX1 input 0)
      cw = {ref_check(8'(d)), 8'(d)};
      {check, data} = cw; check_present = 1;
      #1;
      chk(!use_codec && !error_resist && !corrected, "clean", d);
      // single errors: corrected, fresh check bits
      for (int i = 0; i < 13; i++) begin
        {check, data} = cw ^ (13'd1 << i);
        #1;
        chk(use_codec && corrected && !error_resist && enc_data == 8'(d) &&
            enc_check == ref_check(8'(d)), "single", d);
      end
      // double errors: Error Resist
      for (int k = 0; k < 6; k++) begin
        int i, j;
        i = $urandom_range(0, 12);
        j = (i + 1 + $urandom_range(0, 11)) % 13;
        {check, data} = cw ^ (13'd1 << i) ^ (13'd1 << j);
        #1;
        chk(error_resist && use_codec && !corrected, "double", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
