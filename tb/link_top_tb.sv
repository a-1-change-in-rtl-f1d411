// End-to-end testbench for link_top: serializer, sender, board traces,
// receiver and deserializer, with every parameter at its default.
//
// The board traces are modelled here: each of the four lines and the request
// wire is delayed by 0..MAXD clocks. Five runs, each started by reset: run 0
// with zero delay sends the bit values of the measured waveform first and
// checks the exact codewords on the lines; runs 1 and 2 give each wire its own
// fixed random delay; runs 3 and 4 draw a new random delay for every single
// transition on every wire. Two sources feed the odd and even pairs and two consumers
// take them, all with random pauses. Checks: every value arrives in order on
// its own channel, one line changes per word, the word period is never shorter
// than the round trip through the fastest line and the request wire, it is
// 11 clocks with zero delay, and every mechanism of the
// link happened: all four toggle lines, inverted words, the sender working a
// word ahead of the receiver's decoder, a slow consumer holding the link, a
// pair waiting for its phase in the serializer, and nonzero trace delays.
module link_top_tb
  import c1c4_pkg::*;
;
  localparam int MAXD = 12;
  localparam int N = 300;                 // values per channel per run
  localparam int NFIG = 10;
  localparam logic [1:0] FIG_BITS [NFIG] = '{2'b00, 2'b00, 2'b10, 2'b01, 2'b10,
                                             2'b01, 2'b00, 2'b11, 2'b01, 2'b00};

  logic clk = 0, rst_n = 0;
  onehot4_t in_odd = '0, in_even = '0, out_odd, out_even;
  logic in_odd_ack, in_even_ack, out_odd_ack = 0, out_even_ack = 0;
  code_t tx_wo, rx_wo;
  logic tx_wi, rx_wi;

  int checks = 0, failures = 0;
  int run = 0;
  int dly [5];
  logic [MAXD-1:0] sh [5];
  logic [1:0] q_odd [$], q_even [$];
  bit src_done [2], snk_done [2];

  // mechanism counters
  int line_count [4];
  int inverted = 0, ahead = 0, slow_sink = 0, ser_wait = 0, delayed_runs = 0, varied_runs = 0;
  int words = 0;

  link_top dut (
    .clk, .rst_n,
    .in_odd, .in_odd_ack, .in_even, .in_even_ack,
    .tx_wo, .tx_wi, .rx_wo, .rx_wi,
    .out_odd, .out_odd_ack, .out_even, .out_even_ack
  );

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL run %0d: %s", run, msg); end
  endtask

  // board traces: a fixed delay per wire (runs 1, 2), or a fresh random delay
  // for every transition on every wire (runs 3, 4)
  bit vary = 0;
  logic [4:0] vout;
  int vtimer [5];
  logic [4:0] tr_in;
  assign tr_in = {rx_wi, tx_wo};
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) sh[i] <= '0;
      sh[4] <= '1;
      vout <= 5'b10000;
      for (int i = 0; i < 5; i++) vtimer[i] <= 0;
    end else begin
      for (int i = 0; i < 4; i++) sh[i] <= {sh[i][MAXD-2:0], tx_wo[i]};
      sh[4] <= {sh[4][MAXD-2:0], rx_wi};
      for (int i = 0; i < 5; i++) begin
        if (tr_in[i] == vout[i])  vtimer[i] <= int'($urandom % (MAXD + 1));
        else if (vtimer[i] == 0)  vout[i] <= tr_in[i];
        else                      vtimer[i] <= vtimer[i] - 1;
      end
    end
  end
  always_comb begin
    for (int i = 0; i < 4; i++)
      rx_wo[i] = vary ? vout[i] : (dly[i] == 0) ? tx_wo[i] : sh[i][dly[i]-1];
    tx_wi = vary ? vout[4] : (dly[4] == 0) ? rx_wi : sh[4][dly[4]-1];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line monitor: one change per word, codewords of the waveform in run 0
  code_t last_wo, fig_code;
  int fig_idx, period_start, min_period;
  always @(posedge clk) begin
    if (!rst_n) begin
      last_wo <= '0; fig_code <= '0; fig_idx <= 0;
    end else if (tx_wo != last_wo) begin
      words++;
      chk($countones(tx_wo ^ last_wo) == 1, "one line per word");
      for (int i = 0; i < 4; i++) if (tx_wo[i] != last_wo[i]) line_count[i]++;
      if (tx_wo[3]) inverted++;
      if (run == 0 && fig_idx < NFIG) begin
        code_t e;
        logic [1:0] p;
        p = {fig_code[2] ^ fig_code[3], fig_code[1] ^ fig_code[3]};
        e = fig_code ^ code_t'(1 << (p ^ FIG_BITS[fig_idx]));
        chk(tx_wo == e, $sformatf("waveform word %0d: %b expected %b", fig_idx, tx_wo, e));
        fig_code <= e;
        fig_idx <= fig_idx + 1;
      end
      last_wo <= tx_wo;
    end
  end

  // word period: a new word needs a full round trip (line out, request back)
  int last_change, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) last_change <= -1;
    else if (tx_wo != last_wo) begin
      if (last_change >= 0) begin
        int rt, mind;
        mind = dly[0];
        for (int i = 1; i < 4; i++) if (dly[i] < mind) mind = dly[i];
        rt = vary ? 0 : mind + dly[4];
        chk(cyc - last_change >= rt, "word period shorter than the round trip");
        if (cyc - last_change < min_period) min_period = cyc - last_change;
      end
      last_change <= cyc;
    end
  end

  // mechanisms seen from inside
  always @(posedge clk) if (rst_n) begin
    if ((out_odd != '0 || out_even != '0) && rx_wo != dut.u_receiver.u_buf.q) ahead++;
    if ((out_odd != '0 && !out_odd_ack) || (out_even != '0 && !out_even_ack)) slow_sink++;
    if ((dut.u_sender.ceven && in_even != '0 && !in_even_ack) ||
        (dut.u_sender.codd && in_odd != '0 && !in_odd_ack)) ser_wait++;
  end

  task automatic source(input int ch);
    for (int n = 0; n < N; n++) begin
      logic [1:0] v;
      if (run == 0 && n < NFIG / 2) v = FIG_BITS[2 * n + ch];
      else begin
        v = 2'($urandom);
        repeat ($urandom % 6) @(negedge clk);
      end
      if (ch == 0) begin
        q_odd.push_back(v);
        in_odd = 4'(1 << v);
        while (!in_odd_ack) @(negedge clk);
        in_odd = '0;
        while (in_odd_ack) @(negedge clk);
      end else begin
        q_even.push_back(v);
        in_even = 4'(1 << v);
        while (!in_even_ack) @(negedge clk);
        in_even = '0;
        while (in_even_ack) @(negedge clk);
      end
    end
    src_done[ch] = 1;
  endtask

  task automatic sink(input int ch);
    for (int n = 0; n < N; n++) begin
      int w;
      w = 0;
      if (ch == 0) begin
        while (out_odd == '0 && w < 5000) begin @(negedge clk); w++; end
        chk(q_odd.size() > 0 && out_odd == 4'(1 << q_odd[0]), $sformatf("odd value %0d", n));
        void'(q_odd.pop_front());
        if (run != 0) repeat ($urandom % 8) @(negedge clk);
        out_odd_ack = 1;
        while (out_odd != '0) @(negedge clk);
        out_odd_ack = 0;
      end else begin
        while (out_even == '0 && w < 5000) begin @(negedge clk); w++; end
        chk(q_even.size() > 0 && out_even == 4'(1 << q_even[0]), $sformatf("even value %0d", n));
        void'(q_even.pop_front());
        if (run != 0) repeat ($urandom % 8) @(negedge clk);
        out_even_ack = 1;
        while (out_even != '0) @(negedge clk);
        out_even_ack = 0;
      end
    end
    snk_done[ch] = 1;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) line_count[i] = 0;
    for (run = 0; run < 5; run++) begin
      for (int i = 0; i < 5; i++) dly[i] = (run == 0) ? 0 : int'($urandom % (MAXD + 1));
      if (run == 1) dly[4] = MAXD;          // a slow request wire
      vary = (run >= 3);
      if (run != 0) delayed_runs++;
      if (vary) varied_runs++;
      min_period = 1 << 30;
      rst_n = 0;
      src_done = '{0, 0}; snk_done = '{0, 0};
      repeat (3) @(negedge clk);
      rst_n = 1;
      fork
        source(0);
        source(1);
        sink(0);
        sink(1);
      join
      chk(q_odd.size() == 0 && q_even.size() == 0, "nothing left over");
      // with zero trace delay a word takes 11 clocks when nothing waits
      if (run == 0) chk(min_period == 11, $sformatf("word period %0d clocks, expected 11", min_period));
      if (vary) $display("run %0d: random delay per transition, shortest word period %0d clocks",
                         run, min_period);
      else $display("run %0d: delays %0d %0d %0d %0d / wi %0d, shortest word period %0d clocks",
                    run, dly[0], dly[1], dly[2], dly[3], dly[4], min_period);
    end
    $display("words %0d, lines %0d %0d %0d %0d, inverted %0d, sender ahead %0d, slow consumer %0d, serializer wait %0d",
             words, line_count[0], line_count[1], line_count[2], line_count[3],
             inverted, ahead, slow_sink, ser_wait);
    for (int i = 0; i < 4; i++) chk(line_count[i] > 0, $sformatf("line %0d never toggled", i));
    chk(inverted > 0, "no inverted word");
    chk(ahead > 0, "sender never ran ahead of the decoder");
    chk(slow_sink > 0, "consumer never stalled the link");
    chk(ser_wait > 0, "serializer never held a pair back");
    chk(delayed_runs > 0 && varied_runs > 0, "no run with trace delays");
    chk(words == 5 * 2 * N, $sformatf("word count %0d", words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
