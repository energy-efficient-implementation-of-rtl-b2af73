// Stimulus and checker for one crc_adia_top instance.
//
// Drives RES, New message, the message word, the polynomial and the preset,
// and checks every word the design retains against a bit-serial reference
// CRC computed here (MSB first, CR' = {CR,0} xor (fb ? {g,1} : 0)).
// Scenario: reset, several back-to-back words (the counter restarts on its
// own), preset switched between 0x6363 (106 kbit/s) and 0x0000 (212/424
// kbit/s), some words with a random polynomial, a window with New message
// low (no word may complete), RES restarts (one while idle, one in the
// middle of a word).  It also checks the latency of the first word after
// each reset (counter start to CRC in the register unit: 4*MSG_W + 11
// phases, 75 for 16 bits), that the result stays eight phases on the
// outputs (two power-clock cycles of the 4-phase scheme), and, with RX = 1, the receiver check: a word made of data and
// its own CRC leaves a zero remainder, and a word with one bit flipped does
// not.  Each mechanism that never happened counts as a failure.
//
// The CRC rule, the presets, the polynomial and the 75-phase latency are the
// document's; the scenario, the check points and the 8-phase hold measure are
// this testbench's own choice.
module crc_top_driver
  import crc_adia_pkg::*;
#(
  parameter pc_scheme_e SCHEME = PC_4PHASE,
  parameter int         CRC_W  = 16,
  parameter int         MSG_W  = 16,
  parameter bit         RX     = 1'b0,
  parameter int         ROUNDS = 12
) (
  input  logic             clk,
  output logic             pc_rst,
  output logic             res,
  output logic             new_message,
  output logic [MSG_W-1:0] msg,
  output logic [CRC_W-1:1] gpoly,
  output logic [CRC_W-1:0] init,
  input  logic [MSG_W-1:0] m_out,
  input  logic [CRC_W-1:0] crc_out,
  input  logic             r_count,
  input  logic             wait_n,
  output int               checks,
  output int               failures,
  output logic             done
);

  localparam int TPS = ticks_per_slot(SCHEME);
  localparam int TPC = ticks_per_cycle(SCHEME);
  localparam int LAT_PHASES = 4 * MSG_W + 11;
  localparam int NM_AT  = 3;   // result count at which New message drops
  localparam int MID_AT = 6;   // result count after which RES hits mid-word

  typedef struct packed {
    logic [MSG_W-1:0] m;
    logic [CRC_W-1:1] g;
    logic [CRC_W-1:0] p;
    logic             corrupt;
  } word_t;

  typedef enum logic [1:0] {S_RUN, S_NM_LOW, S_RES_HOLD, S_MID_WAIT} state_e;

  // Bit-serial reference over the low nbits of m, MSB first.
  function automatic logic [CRC_W-1:0] crc_ref(logic [MSG_W-1:0] m, int nbits,
                                               logic [CRC_W-1:1] g,
                                               logic [CRC_W-1:0] p);
    logic [CRC_W-1:0] c;
    logic fb;
    c = p;
    for (int i = nbits - 1; i >= 0; i--) begin
      fb = m[i] ^ c[CRC_W-1];
      c  = {c[CRC_W-2:0], 1'b0} ^ ({g, 1'b1} & {CRC_W{fb}});
    end
    return c;
  endfunction

  function automatic logic [MSG_W-1:0] rand_word();
    logic [MSG_W-1:0] w;
    for (int i = 0; i < MSG_W; i++) w[i] = 1'($urandom());
    return w;
  endfunction

  word_t cur;
  word_t exp_q[$];
  int    n_words_started;
  // mechanism counters
  int n_results, n_preset_106, n_preset_212, n_poly_other, n_nm_hold;
  int n_res_idle, n_res_mid, n_latency, n_hold, n_rx_zero, n_rx_detect;

  function automatic word_t new_word(int idx);
    word_t w;
    logic [MSG_W-1:0] data;
    int flip;
    w.p = (idx % 2 == 0) ? CRC_W'(PRESET_106K) : CRC_W'(PRESET_212K_424K);
    w.g = (idx % 3 == 2) ? (CRC_W-1)'($urandom()) : (CRC_W-1)'(NFC_GPOLY);
    w.corrupt = 1'b0;
    if (RX) begin
      data = rand_word() >> CRC_W;
      w.m  = (data << CRC_W) | MSG_W'(crc_ref(data, MSG_W - CRC_W, w.g, w.p));
      if (idx % 3 == 1) begin
        flip = $urandom_range(MSG_W-1, 0);
        w.m[flip] = ~w.m[flip];
        w.corrupt = 1'b1;
      end
    end else if (idx == 0 && MSG_W == 16) begin
      w.m = MSG_W'(16'h482C);   // the example word of the block diagram
    end else begin
      w.m = rand_word();
    end
    return w;
  endfunction

  task automatic apply(word_t w);
    msg   = w.m;
    gpoly = w.g;
    init  = w.p;
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s scheme=%0d W=%0d] %s at %0t", RX ? "rx" : "tx",
               SCHEME, MSG_W, what, $time);
    end
  endtask

  initial begin : drive
    state_e st;
    int     tick, timer, t_start, last_change, hold_ref;
    logic   prev_rc, prev_wn, lat_pending, hold_pending, start_seen, pend_apply;
    logic [MSG_W+CRC_W-1:0] prev_out;
    word_t  e;

    checks = 0; failures = 0; done = 1'b0;
    n_results = 0; n_preset_106 = 0; n_preset_212 = 0; n_poly_other = 0;
    n_nm_hold = 0; n_res_idle = 0; n_res_mid = 0; n_latency = 0; n_hold = 0;
    n_rx_zero = 0; n_rx_detect = 0; n_words_started = 0;
    tick = 0; timer = 0; t_start = 0; last_change = 0; hold_ref = 0;
    lat_pending = 1'b0; hold_pending = 1'b0; start_seen = 1'b0; pend_apply = 1'b0;

    pc_rst = 1'b1; res = 1'b1; new_message = 1'b1;
    cur = new_word(n_words_started++);
    apply(cur);
    repeat (3) @(posedge clk);
    #1 pc_rst = 1'b0;
    repeat (16 * TPS) @(posedge clk);
    #1 res = 1'b0;
    lat_pending = 1'b1;
    st = S_RUN;
    prev_rc = r_count; prev_wn = wait_n; prev_out = {m_out, crc_out};

    while (!done) begin
      @(posedge clk);
      #1 tick++;

      // outputs changed: the retain stage took a new value
      if ({m_out, crc_out} != prev_out) begin
        if (hold_pending) begin
          check(tick - hold_ref == 8 * TPS, "result held for eight phases");
          hold_pending = 1'b0;
          n_hold++;
        end
        last_change = tick;
      end

      // R_count rises in position 3; count 0 of the first bit was issued by
      // the counter's first stage (position 0) three slots earlier
      if (!prev_rc && r_count && lat_pending && !start_seen) begin
        t_start    = tick - 3 * TPS;
        start_seen = 1'b1;
      end

      // end of a word: R_count drops.  The next word's inputs are applied
      // when it rises again: by then every copy of the pipeline has read
      // the last bit, and none has yet read the first bit of the next word.
      if (prev_rc && !r_count && !res && st == S_RUN) begin
        exp_q.push_back(cur);
        cur = new_word(n_words_started++);
        pend_apply = 1'b1;
      end
      if (!prev_rc && r_count && pend_apply) begin
        apply(cur);
        pend_apply = 1'b0;
      end
      if (prev_rc && !r_count && st == S_NM_LOW)
        check(1'b0, "counter ran while New message was low");

      // result retained
      if (prev_wn && !wait_n) begin
        if (st == S_NM_LOW) begin
          check(1'b0, "result produced while New message was low");
        end else if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          check(crc_out == crc_ref(e.m, MSG_W, e.g, e.p), "CRC value");
          check(m_out == e.m, "message word in register unit");
          if (RX) begin
            if (e.corrupt) begin
              check(crc_out != '0, "corrupted word gives a non-zero remainder");
              n_rx_detect++;
            end else begin
              check(crc_out == '0, "received word gives a zero remainder");
              n_rx_zero++;
            end
          end
          if (e.p == CRC_W'(PRESET_106K)) n_preset_106++;
          else                            n_preset_212++;
          if (e.g != (CRC_W-1)'(NFC_GPOLY)) n_poly_other++;
          if (lat_pending) begin
            check(start_seen && (last_change - t_start == (LAT_PHASES - 1) * TPS),
                  "latency from counter start to CRC in register unit");
            $display("latency: %0d phases, %0d ticks of Tr", (last_change - t_start) / TPS + 1,
                     last_change - t_start + TPS);
            n_latency++;
            lat_pending = 1'b0;
            start_seen  = 1'b0;
          end
          hold_pending = 1'b1;
          hold_ref     = last_change;
          n_results++;
          if (n_results == NM_AT) begin
            new_message = 1'b0;
            st    = S_NM_LOW;
            timer = 3 * (MSG_W + 1) * TPC;
          end else if (n_results == MID_AT) begin
            st    = S_MID_WAIT;
            timer = 5 * TPC;
          end else if (n_results >= ROUNDS) begin
            done = 1'b1;
          end
        end
      end

      // scenario timers
      case (st)
        S_NM_LOW: if (--timer == 0) begin
          n_nm_hold++;
          res = 1'b1; new_message = 1'b1;
          exp_q.delete();
          pend_apply = 1'b0;
          cur = new_word(n_words_started++);
          apply(cur);
          n_res_idle++;
          st = S_RES_HOLD; timer = 16 * TPS;
        end
        S_MID_WAIT: if (--timer == 0) begin
          res = 1'b1;
          exp_q.delete();
          pend_apply = 1'b0;
          cur = new_word(n_words_started++);
          apply(cur);
          n_res_mid++;
          st = S_RES_HOLD; timer = 12 * TPS;
        end
        S_RES_HOLD: if (--timer == 0) begin
          res = 1'b0;
          lat_pending = 1'b1;
          start_seen  = 1'b0;
          hold_pending = 1'b0;
          st = S_RUN;
        end
        default: ;
      endcase

      prev_rc  = r_count;
      prev_wn  = wait_n;
      prev_out = {m_out, crc_out};
    end

    // every mechanism must have happened
    check(n_results >= ROUNDS, "words completed back to back");
    check(n_preset_106 > 0, "preset 0x6363 used");
    check(n_preset_212 > 0, "preset 0x0000 used");
    check(n_poly_other > 0, "non-NFC polynomial used");
    check(n_nm_hold > 0, "New message low held the counter");
    check(n_res_idle > 0, "RES restart after idle");
    check(n_res_mid > 0, "RES in the middle of a word");
    check(n_latency >= 3, "latency measured after each reset");
    check(n_hold > 0, "hold of the result observed");
    if (RX) begin
      check(n_rx_zero > 0, "zero remainder on a correct word");
      check(n_rx_detect > 0, "error detected on a corrupted word");
    end
    $display("driver scheme=%0d MSG_W=%0d RX=%0d: words=%0d p6363=%0d p0000=%0d poly=%0d nm_hold=%0d res_idle=%0d res_mid=%0d latency=%0d hold=%0d rx_ok=%0d rx_err=%0d",
             SCHEME, MSG_W, RX, n_results, n_preset_106, n_preset_212, n_poly_other,
             n_nm_hold, n_res_idle, n_res_mid, n_latency, n_hold, n_rx_zero, n_rx_detect);
  end

endmodule
