// ftsecded_buffer: fault-tolerant input buffer of one NoC router port
// (FTSECDED: SECDED protection stored in an otherwise idle virtual channel).
//
// Instead of adding redundant storage, the port keeps each flit's data in
// virtual channel VC1 and its SECDED check bits in VC0, which in a 5-port
// XY-routed router is idle most of the time. Check bits arrive from the
// previous router when it had a free VC for them (in_flit.chk_valid).
// When the flit leaves the buffer:
//   * double error found      -> flit dropped, retx_req pulses for one
//                                cycle: the previous router must resend it
//   * next router VC free     -> data + check bits sent; the received check
//                                bits are reused when clean, computed from
//                                the data when none arrived, recomputed
//                                after a single-error correction
//   * next router VC not free -> (corrected) data sent without check bits
//
// Interface: in_valid/in_ready and out_valid/out_ready are valid/ready
// handshakes (a transfer happens when both are high at a clock edge).
// next_vc_free is the next router's VC status. Timing: a flit accepted at
// edge t is at the output from edge t onwards (one cycle latency through an
// empty buffer); one flit per cycle can pass. Asynchronous active-low reset.
//
// The VC0/VC1 split, the Decoder & Encoder, MUX1/MUX2 and the send
// algorithm follow the document; buffer depth, handshakes, reset and the
// one-cycle retransmission pulse are this design's choices.
module ftsecded_buffer
  import ft_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // from previous router
  input  logic       in_valid,
  input  link_flit_t in_flit,
  output logic       in_ready,
  output logic       retx_req,
  // to next router
  input  logic       next_vc_free,
  output logic       out_valid,
  output link_flit_t out_flit,
  input  logic       out_ready,
  // event flags for monitoring
  output logic       corrected
);

  logic              push, pop;
  logic [DATA_W-1:0] vc1_data;
  check_entry_t      vc0_in, vc0_head;
  logic              vc1_empty, vc1_full, vc0_empty, vc0_full;

  assign in_ready = !vc1_full;
  assign push     = in_valid && in_ready;
  assign vc0_in   = '{present: in_flit.chk_valid,
                      check:   in_flit.chk_valid ? in_flit.check : '0};

  // VC1: data.
  vc_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_vc1 (
    .clk, .rst_n,
    .push, .wdata(in_flit.data),
    .pop,  .rdata(vc1_data),
    .empty(vc1_empty), .full(vc1_full)
  );

  // VC0: check bits of the same flits.
  vc_fifo #(.WIDTH($bits(check_entry_t)), .DEPTH(DEPTH)) u_vc0 (
    .clk, .rst_n,
    .push, .wdata(vc0_in),
    .pop,  .rdata(vc0_head),
    .empty(vc0_empty), .full(vc0_full)
  );

  logic [DATA_W-1:0]  enc_data;
  logic [CHECK_W-1:0] enc_check;
  logic               error_resist, use_codec, dec_corrected;

  ft_codec u_codec (
    .data         (vc1_data),
    .check        (vc0_head.check),
    .check_present(vc0_head.present),
    .enc_data,
    .enc_check,
    .corrected    (dec_corrected),
    .error_resist,
    .use_codec
  );

  ft_out_sel u_sel (
    .head_valid  (!vc1_empty),
    .raw_data    (vc1_data),
    .raw_check   (vc0_head.check),
    .enc_data,
    .enc_check,
    .use_codec,
    .error_resist,
    .next_vc_free,
    .out_ready,
    .out_valid,
    .out_flit,
    .retx_req,
    .pop
  );

  assign corrected = !vc1_empty && dec_corrected && out_valid && out_ready;

  // The two VCs move in lock step.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (vc0_empty == vc1_empty) && (vc0_full == vc1_full))
    else $error("ftsecded_buffer: VC0 and VC1 out of step");

endmodule
