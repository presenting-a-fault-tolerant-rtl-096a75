// ft_out_sel: MUX1, MUX2 and the send decision of the FTSECDED buffer.
//
// For the flit at the head of the buffer (head_valid) it follows the
// scheme's send algorithm:
//
//   if Error Resist            -> assert the error-retransmission request,
//                                 drop the flit, send nothing
//   else if next router VC free -> send Data + DataCheck (from MUX1: the
//                                 stored pair, or the Decoder & Encoder's
//                                 output when the check bits had to be
//                                 computed or the data was corrected)
//   else                       -> send Data alone (no check bits)
//
// MUX1 is selected by the Decoder & Encoder (use_codec), MUX2 by the next
// router's VC status (next_vc_free). out_valid/out_ready is a
// valid/ready handshake to the next router; pop tells the buffer the head
// has left (sent, or dropped for retransmission). retx_req is high for
// exactly the cycle a flit is dropped. Purely combinational.
// The data-only path carries the corrected data, so a single error is
// repaired whichever path is taken.
module ft_out_sel
  import ft_pkg::*;
(
  input  logic               head_valid,
  // stored pair (MUX1 input 0)
  input  logic [DATA_W-1:0]  raw_data,
  input  logic [CHECK_W-1:0] raw_check,
  // Decoder & Encoder output (MUX1 input 1)
  input  logic [DATA_W-1:0]  enc_data,
  input  logic [CHECK_W-1:0] enc_check,
  input  logic               use_codec,
  input  logic               error_resist,
  input  logic               next_vc_free,
  input  logic               out_ready,
  output logic               out_valid,
  output link_flit_t         out_flit,
  output logic               retx_req,
  output logic               pop
);

  logic [DATA_W-1:0]  mux1_data;
  logic [CHECK_W-1:0] mux1_check;

  // MUX1: Data + DataCheck, stored or computed.
  assign mux1_data  = use_codec ? enc_data  : raw_data;
  assign mux1_check = use_codec ? enc_check : raw_check;

  // MUX2: Data + DataCheck when the next router has a free VC, else Data.
  always_comb begin
    if (next_vc_free) begin
      out_flit.data      = mux1_data;
      out_flit.check     = mux1_check;
      out_flit.chk_valid = 1'b1;
    end else begin
      out_flit.data      = enc_data;
      out_flit.check     = '0;
      out_flit.chk_valid = 1'b0;
    end
  end

  assign retx_req  = head_valid && error_resist;
  assign out_valid = head_valid && !error_resist;
  assign pop       = retx_req || (out_valid && out_ready);

endmodule
