// tb_ft_out_sel: drives MUX1/MUX2 and the send decision with random
// inputs and compares every output with the send algorithm:
// Error Resist -> retransmission request and drop; next router VC free ->
// data + check bits from MUX1; otherwise data alone.
module tb_ft_out_sel;
  import ft_pkg::*;

  logic head_valid, use_codec, error_resist, next_vc_free, out_ready;
  logic [7:0] raw_data, enc_data;
  logic [4:0] raw_check, enc_check;
  logic out_valid, retx_req, pop;
  link_flit_t out_flit;
  int checks = 0, failures = 0;
  int n_retx = 0, n_pair = 0, n_data = 0, n_mux1_raw = 0, n_mux1_enc = 0;

  ft_out_sel dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      {head_valid, use_codec, error_resist, next_vc_free, out_ready} = 5'($urandom);
      raw_data = 8'($urandom); enc_data = 8'($urandom);
      raw_check = 5'($urandom); enc_check = 5'($urandom);
      #1;
      if (!head_valid) begin
        chk(!out_valid && !retx_req && !pop, "idle");
      end else if (error_resist) begin
        n_retx++;
        chk(retx_req && !out_valid && pop, "retransmission request");
      end else begin
        chk(out_valid && !retx_req && pop == out_ready, "send handshake");
        if (next_vc_free) begin
          n_pair++;
          if (use_codec) n_mux1_enc++; else n_mux1_raw++;
          chk(out_flit.chk_valid, "check bits sent");
          chk(out_flit.data  == (use_codec ? enc_data  : raw_data),  "MUX1 data");
          chk(out_flit.check == (use_codec ? enc_check : raw_check), "MUX1 check");
        end else begin
          n_data++;
          chk(!out_flit.chk_valid && out_flit.data == enc_data, "data only");
        end
      end
    end
    chk(n_retx > 0 && n_pair > 0 && n_data > 0 && n_mux1_raw > 0 && n_mux1_enc > 0,
        "all paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
