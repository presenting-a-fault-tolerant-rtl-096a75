// tb_ftsecded_buffer: end-to-end test of the FTSECDED input buffer at its
// default parameters.
//
// A model of the previous router sends packets of 4, 6, ..., 20 flits of
// 8-bit data (the packet sizes and channel width of the reliability
// study), three rounds. Each flit carries its check bits with probability
// 3/4; those that do get 0, 1 or 2 bit errors injected on the 13-bit
// codeword. A model of the next router toggles its VC status and its
// ready at random. Flits dropped with a retransmission request are sent
// again. The checks:
//   * every flit leaves once, in order among the flits not dropped, with
//     its original data (single errors corrected);
//   * check bits leave exactly when the next router's VC is free, and
//     always form a valid codeword with the data;
//   * a double error never leaves the buffer; it raises retx_req;
//   * latency through an empty buffer is one cycle, and a burst of flits
//     passes at one flit per cycle.
// Every mechanism (stored check bits forwarded, check bits computed,
// single-error correction, retransmission request, data-only send, input
// stall on a full buffer, output back-pressure) is counted and must occur.
module tb_ftsecded_buffer;
  import ft_pkg::*;
  import ft_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, retx_req, next_vc_free = 1;
  logic out_valid, out_ready = 1, corrected;
  link_flit_t in_flit = '0, out_flit;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_computed = 0, n_corrected = 0, n_retx = 0, n_data_only = 0;
  int n_stall = 0, n_backpressure = 0, n_sent = 0, n_delivered = 0;

  typedef struct {
    logic [7:0] data;
    bit         has_chk;
    int         nerr;
  } flit_t;

  flit_t src_q[$];     // flits still to send (new or resent)
  flit_t flight_q[$];  // flits inside the buffer, oldest first

  ftsecded_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build the link word of a flit, injecting its errors.
  function automatic link_flit_t make_link(flit_t f);
    link_flit_t l;
    logic [12:0] cw;
    int i, j;
    l.data = f.data;
    l.check = '0;
    l.chk_valid = f.has_chk;
    if (f.has_chk) begin
      cw = {ref_check(f.data), f.data};
      if (f.nerr >= 1) begin
        i = $urandom_range(0, 12);
        cw[i] = ~cw[i];
        if (f.nerr >= 2) begin
          j = (i + 1 + $urandom_range(0, 11)) % 13;
          cw[j] = ~cw[j];
        end
      end
      {l.check, l.data} = cw;
    end
    return l;
  endfunction

  function automatic flit_t new_flit();
    flit_t f;
    int r;
    f.data    = 8'($urandom);
    f.has_chk = ($urandom_range(0, 3) != 0);
    r = $urandom_range(0, 99);
    f.nerr = !f.has_chk ? 0 : (r < 70) ? 0 : (r < 88) ? 1 : 2;
    return f;
  endfunction

  // One clock cycle: inputs are driven at the falling edge, the outcome of
  // the next rising edge is read and modelled just before it.
  task automatic cycle(bit try_send, int ready_pct, int vcfree_pct);
    flit_t f;
    @(negedge clk);
    in_valid     = try_send && src_q.size() > 0;
    if (in_valid) in_flit = make_link(src_q[0]);
    out_ready    = ($urandom_range(0, 99) < ready_pct);
    next_vc_free = ($urandom_range(0, 99) < vcfree_pct);
    #1;
    if (in_valid && !in_ready) n_stall++;
    if (out_valid && !out_ready) n_backpressure++;
    chk(!(retx_req && out_valid), "retx_req and out_valid exclusive");
    if (retx_req) begin
      n_retx++;
      chk(flight_q.size() > 0, "drop with a flit inside");
      if (flight_q.size() > 0) begin
        f = flight_q.pop_front();
        chk(f.nerr == 2, "only double errors are dropped");
        f.nerr = 0;           // the resent copy arrives clean
        src_q.push_back(f);
      end
    end else if (out_valid && out_ready) begin
      chk(flight_q.size() > 0, "output with a flit inside");
      if (flight_q.size() > 0) begin
        f = flight_q.pop_front();
        n_delivered++;
        chk(out_flit.data == f.data, "data delivered intact");
        chk(f.nerr < 2, "no double error delivered");
        chk(out_flit.chk_valid == next_vc_free, "check bits sent iff next VC free");
        if (out_flit.chk_valid) begin
          chk(out_flit.check == ref_check(f.data), "check bits form a codeword");
          if (f.has_chk && f.nerr == 0) n_fwd++;
          if (!f.has_chk) n_computed++;
        end else begin
          n_data_only++;
        end
        if (f.nerr == 1) begin
          n_corrected++;
          chk(corrected, "correction flagged");
        end else begin
          chk(!corrected, "no correction flagged");
        end
      end
    end
    if (in_valid && in_ready) begin
      flight_q.push_back(src_q.pop_front());
      n_sent++;
    end
    @(posedge clk);
  endtask

  initial begin
    flit_t f;
    int lat, got;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Latency: one clean flit into the empty buffer.
    f.data = 8'h3C; f.has_chk = 1; f.nerr = 0;
    src_q.push_back(f);
    cycle(1, 100, 100);
    lat = 0;
    while (flight_q.size() > 0 && lat < 10) begin
      cycle(0, 100, 100);
      lat++;
    end
    chk(lat == 1, "one-cycle latency through an empty buffer");

    // Throughput: a clean burst of 20 flits leaves in 20 consecutive cycles.
    for (int i = 0; i < 20; i++) begin
      f.data = 8'($urandom); f.has_chk = 1; f.nerr = 0;
      src_q.push_back(f);
    end
    got = n_delivered;
    cycle(1, 100, 100);
    for (int i = 0; i < 20; i++) cycle(1, 100, 100);
    chk(n_delivered - got == 20, "one flit per cycle");

    // Packets of 4..20 flits with errors, random flow control.
    for (int round = 0; round < 3; round++) begin
      for (int psize = 4; psize <= 20; psize += 2) begin
        for (int i = 0; i < psize; i++) src_q.push_back(new_flit());
        while (src_q.size() > 0) cycle($urandom_range(0, 99) < 85, 60, 60);
      end
    end
    while (flight_q.size() > 0 || src_q.size() > 0) cycle(1, 70, 60);

    chk(n_delivered + n_retx == n_sent, "every accepted flit left once");
    $display("sent=%0d delivered=%0d forwarded-check=%0d computed-check=%0d corrected=%0d retransmit=%0d data-only=%0d stall=%0d backpressure=%0d",
             n_sent, n_delivered, n_fwd, n_computed, n_corrected, n_retx, n_data_only,
             n_stall, n_backpressure);
    chk(n_fwd > 0,          "stored check bits forwarded");
    chk(n_computed > 0,     "check bits computed");
    chk(n_corrected > 0,    "single error corrected");
    chk(n_retx > 0,         "retransmission requested");
    chk(n_data_only > 0,    "data sent without check bits");
    chk(n_stall > 0,        "input stalled on a full buffer");
    chk(n_backpressure > 0, "output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
