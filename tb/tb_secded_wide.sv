// tb_secded_wide: round-trip test of the SECDED encoder and decoder at a
// 32-bit channel, to show the width parameter works beyond the 8-bit
// default. Random words are encoded, one or two of the 39 codeword bits
// are flipped, and the decoder must correct every single error and flag
// every double error; clean words must pass with a zero syndrome.
module tb_secded_wide;
  localparam int unsigned DW = 32;
  localparam int unsigned HW = ft_pkg::hamming_bits(DW);
  localparam int unsigned CW = HW + 1;
  localparam int unsigned NB = DW + CW;

  logic [DW-1:0] data, data_in, data_out;
  logic [CW-1:0] check, check_in;
  logic [HW-1:0] syndrome;
  logic single_err, double_err;
  int checks = 0, failures = 0;

  secded_encoder #(.DATA_W(DW)) u_enc (.data, .check);
  secded_decoder #(.DATA_W(DW)) u_dec (.data_in, .check_in, .syndrome, .data_out,
                                       .single_err, .double_err);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s data=%08h", what, data);
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
    logic [NB-1:0] cw;
    int i, j;
    chk(HW == 6, "6 Hamming bits for 32 data bits");
    for (int n = 0; n < 2000; n++) begin
      data = $urandom;
      #1;
      cw = {check, data};
      {check_in, data_in} = cw;
      #1;
      chk(!single_err && !double_err && syndrome == '0 && data_out == data, "clean");
      i = $urandom_range(0, NB - 1);
      {check_in, data_in} = cw ^ (NB'(1) << i);
      #1;
      chk(single_err && !double_err && data_out == data, "single");
      j = (i + 1 + $urandom_range(0, NB - 2)) % NB;
      {check_in, data_in} = cw ^ (NB'(1) << i) ^ (NB'(1) << j);
      #1;
      chk(double_err && !single_err, "double");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
