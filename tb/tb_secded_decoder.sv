// tb_secded_decoder: exhaustive test of the SECDED decoder. For every
// 8-bit word the reference codeword is applied clean, with every single
// bit error (13 cases) and with every double bit error (78 cases). A clean
// word must pass with zero syndrome, a single error must be corrected and
// flagged, a double error must be flagged as double and never as single.
module tb_secded_decoder;
  import ft_tb_pkg::*;

  logic [7:0] data_in, data_out;
  logic [4:0] check_in;
  logic [3:0] syndrome;
  logic       single_err, double_err;
  int checks = 0, failures = 0;

  secded_decoder #(.DATA_W(8)) dut (.data_in, .check_in, .syndrome, .data_out,
                                    .single_err, .double_err);

  task automatic expect_ok(bit c, string what, int d, int e1, int e2);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s data=%02h err bits %0d,%0d", what, d, e1, e2);
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
      cw = {ref_check(8'(d)), 8'(d)};
      {check_in, data_in} = cw;
      #1;
      expect_ok(!single_err && !double_err && syndrome == 0 && data_out == 8'(d),
                "clean", d, -1, -1);
      for (int i = 0; i < 13; i++) begin
        bad = cw ^ (13'd1 << i);
        {check_in, data_in} = bad;
        #1;
        expect_ok(single_err && !double_err && data_out == 8'(d), "single", d, i, -1);
        for (int j = i + 1; j < 13; j++) begin
          {check_in, data_in} = bad ^ (13'd1 << j);
          #1;
          expect_ok(double_err && !single_err, "double", d, i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
