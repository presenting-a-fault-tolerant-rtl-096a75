# FTSECDED: error-protected NoC input buffering in an idle virtual channel

Soft errors and crosstalk can flip bits in a network-on-chip router's links and
input buffers. Common remedies add storage: triple the buffer and take a
majority vote (TMR), or widen every buffer slot to hold SECDED check bits.
This design adds none. A 5-port router with XY routing keeps two virtual
channels (VCs) per input port to avoid deadlock, and one of them is idle most
of the time. The port uses that idle VC to hold each flit's check bits.

In each input port:

* **VC1** stores the flit's data (8 bits).
* **VC0** stores the flit's SECDED check bits (5 bits), plus a flag that says
  whether check bits came with the flit at all.

When a flit leaves the buffer, a decoder checks the data against its check
bits:

* A **single** bit error is corrected.
* A **double** error drops the flit and asks the previous router to send it
  again.

Check bits travel to the next router only if that router also has a free VC
to hold them. Otherwise the data goes alone, and a later hop that has room
computes the check bits again.

The RTL here is that input buffer, fully working at its default size. The
router around it (routing, VC and switch allocation, crossbar) is not
included. The buffer's link signals are its ports.

## Datapath

```
                 in_flit.check / chk_valid
 previous  ───────────────────────────────►  VC0 (check bits + present flag)──┐
 router    ───────────────────────────────►  VC1 (data) ─────────────────────┤
           in_flit.data                                                      │
                                                                             ▼
                      ┌──────────────── ft_codec (Decoder & Encoder) ────────────────┐
                      │ secded_decoder: syndrome generator → syndrome decoder →      │
                      │                 error correction, error detection            │
                      │ secded_encoder: check bits of the (corrected) data           │
                      └───┬───────────────┬───────────────────┬──────────────────────┘
                enc_data/enc_check    use_codec        error_resist
                          │               │                   │
     stored data+check ──►│ MUX1 ◄────────┘                   │
                          ▼                                   │
        enc_data ─────► MUX2 ◄── next_vc_free                 │
                          │                                   ▼
                          ▼                        retx_req to previous router
                   out_flit to next router
```

MUX1 picks which data + check pair goes out:

* The **stored pair**, as it came from the previous router, when check bits
  arrived and the decoder finds no error. Nothing is recomputed.
* The **codec's output** otherwise: the check bits were computed because none
  arrived, or the data was corrected and its check bits recomputed.

MUX2 picks between that pair and the data alone. It is steered by the next
router's VC status.

## The send decision

For the flit at the head of the buffer (`ft_out_sel`):

| Condition at the head | Action |
|---|---|
| check bits present and decoder reports a double error | drop the flit, `retx_req` = 1 for that cycle |
| else, `next_vc_free` = 1, check bits arrived clean | send stored data + stored check bits |
| else, `next_vc_free` = 1, check bits missing or data corrected | send data + freshly computed check bits |
| else (`next_vc_free` = 0) | send the (corrected) data alone, `chk_valid` = 0 |

Two points in this table are this design's own choices:

* **Data-only sends.** The data alone is always taken after correction. A
  drawing of the scheme routes the data-only path straight from the data VC,
  which would forward a single error uncorrected when the next VC is busy.
  The written description says that a detected single error is always
  corrected, and this design follows the text.
* **Check bits after a correction.** When a single error is corrected, the
  check bits are recomputed, so the next router always receives a valid
  codeword.

## Check-bit code

The code is an extended Hamming code, (13,8) for the 8-bit channel:

* Data bits sit at codeword positions 3, 5, 6, 7, 9, 10, 11 and 12.
* Hamming bit `k` (`check[k]`, k = 0..3) is the XOR of the data bits whose
  position has bit `k` set.
* `check[4]` is the overall parity of the data and the four Hamming bits.

The decoder classifies each flit as follows:

| syndrome | overall parity | result |
|---|---|---|
| 0 | ok | clean |
| ≤ 12 | wrong | single error; the data bit at position = syndrome is flipped (a check-bit error leaves the data as is) |
| ≠ 0 | ok | double error → `error_resist` |
| > 12 | wrong | uncorrectable → `error_resist` |

The width is generic. `ft_pkg::hamming_bits(DATA_W)` gives the number of
Hamming bits. `ft_pkg::data_pos(i)` gives the codeword position of data
bit `i`, which is `i + 1 + p`, where `p` counts the powers of two at or below
that position.

A flit that arrives without check bits cannot be checked. It passes as
received, and an error on it goes undetected.

## Retransmission

The buffer handles a double error like this:

* The damaged flit is removed from the buffer.
* `retx_req` is high for exactly the cycle in which it is removed.
* No other flit leaves in that cycle.
* The flits behind it keep moving.

The previous router must send the dropped flit again. The request says only
"the flit currently leaving was dropped", so the sender has to track which
flits are still inside this buffer. The testbench's sender keeps an in-order
list of them. Packet reassembly and ordering across a resend are left to the
network. This buffer does not reorder anything else.

## Interface and timing

`ftsecded_buffer #(DEPTH = 4)` has these ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (empties both VCs) |
| `in_valid`, `in_flit`, `in_ready` | in/in/out | flit from the previous router; `link_flit_t` = `{chk_valid, check[4:0], data[7:0]}` |
| `retx_req` | out | retransmission request to the previous router |
| `next_vc_free` | in | the next router can hold check bits (MUX2 select) |
| `out_valid`, `out_flit`, `out_ready` | out/out/in | flit to the next router |
| `corrected` | out | the flit leaving now had a single error corrected (monitoring) |

Timing:

* **Handshakes.** Both links use valid/ready: a transfer happens at a rising
  edge where both are high.
* **Latency.** A flit accepted at edge *t* is offered at the output right
  after edge *t*, so it can leave at edge *t+1*.
* **Throughput.** The buffer sustains one flit per cycle when `DEPTH` ≥ 2.
* **Combinational path.** Decoding, encoding and the muxes sit between the
  VC heads and the output port. The outputs are not registered.

## Modules

| file | what it is |
|---|---|
| `rtl/ft_pkg.sv` | widths (`DATA_W` = 8, `CHECK_W` = 5), code-position functions, `link_flit_t`, `check_entry_t` |
| `rtl/vc_fifo.sv` | one VC buffer: DEPTH-entry circular FIFO, push and pop in the same cycle allowed, assertions against overflow and underflow |
| `rtl/secded_encoder.sv` | check bits of a data word |
| `rtl/secded_decoder.sv` | syndrome, single-error correction, double-error detection |
| `rtl/ft_codec.sv` | Decoder & Encoder: decode if check bits present, re-encode, `error_resist`, MUX1 select |
| `rtl/ft_out_sel.sv` | MUX1, MUX2 and the send decision, handshake to the next router, pop and `retx_req` |
| `rtl/ftsecded_buffer.sv` | top: VC0 + VC1 in lock step, codec, output select |

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/ft_tb_pkg.sv` holds a
reference model of the code, written independently of the RTL: each Hamming
bit comes from XOR-ing the positions of the set data bits.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ft_pkg.sv tb/ft_tb_pkg.sv tb/tb_ftsecded_buffer.sv --top-module tb_ftsecded_buffer
./obj_dir/Vtb_ftsecded_buffer
```

Swap in another `tb_*.sv` and its name to run the other testbenches.

| testbench | what it checks |
|---|---|
| `tb_secded_encoder` | all 256 words against the reference; distance between neighbouring codewords |
| `tb_secded_decoder` | all 256 words clean, with every single error (13) and every double error (78) |
| `tb_vc_fifo` | random push/pop against a queue model; flags; write-to-read latency; push+pop when full |
| `tb_ft_codec` | no check bits, clean, every single error, sampled double errors, for every word |
| `tb_ft_out_sel` | random control and data inputs against the send decision table |
| `tb_secded_wide` | encoder/decoder round trip at a 32-bit channel: clean, random single and double errors |
| `tb_ftsecded_buffer` | end to end at default parameters (details below) |

The end-to-end test, `tb_ftsecded_buffer`, runs at the default parameters:

* **Traffic.** Packets of 4, 6, …, 20 flits (three rounds). One flit in four
  arrives without check bits. The others carry 0, 1 or 2 injected bit errors.
* **Neighbours.** The next router's VC status and ready toggle at random.
  Dropped flits are resent.
* **Data and check bits.** Each flit leaves once, with intact data. Check
  bits go out exactly when `next_vc_free` is high, and they always form a
  valid codeword.
* **Timing.** The test checks the one-cycle latency and the one-flit-per-cycle
  rate.
* **Coverage.** Each mechanism must occur at least once: stored check bits
  forwarded, check bits computed, single-error correction, retransmission,
  data-only send, input stall on a full buffer, and output back-pressure.

## Changing it

* **Buffer depth.** `DEPTH` sets the entries per VC. Use `DEPTH` ≥ 2 for
  full rate. `in_ready` depends only on the fill level, so there is no
  combinational path from `out_ready` to `in_ready`. A one-entry buffer
  therefore passes a flit only every second cycle. The end-to-end test also
  passes at depths 2 and 7.
* **Channel width.** Change `ft_pkg::DATA_W`. The check width follows
  automatically. The testbenches' reference model covers only the 8-bit
  channel.
* **Configurable modes.** The classic SECDED buffer can be switched between
  correct mode and detect-only mode, and can bypass the decoder. Those
  options are not provided here, because this scheme always corrects one
  error and detects two.

## Limits and departures

* **Check bits belong to flits, not to VC0.** VC0 is treated as always
  available to hold check bits for the flits in VC1, moving in lock step.
  Sharing VC0 with real traffic (its deadlock-avoidance role) needs the
  router's VC allocator, which is not part of this design. Whether check bits
  accompany a flit is decided upstream, by the previous router's own view of
  this router's VC.
* **Triple errors.** The error analysis behind this scheme credits it with
  detecting most triple errors, on the argument that data and check bits sit
  in separate places. A single (13,8) SECDED code gives no such guarantee: a
  triple error can be miscorrected. The decoder only promises single-error
  correction and double-error detection.
* **Retransmission protocol.** Only the request signal is defined. The sender
  side is not part of this RTL.
* **Not included.** The TMR and plain-SECDED buffers that the scheme is
  compared against are not included.
* **No fixed sizes.** Buffer depth, handshakes and reset style are not fixed
  by the scheme. The values here are ordinary choices.
