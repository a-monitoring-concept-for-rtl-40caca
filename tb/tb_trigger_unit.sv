// tb_trigger_unit: checks conditions, combinations, sequences, the event
// counter, the trigger position and the response time of the trigger unit.
// Expected trigger values are computed in the testbench from the input
// vectors. The fast path must raise the record enable in the very cycle of
// the event; the sequence path one cycle after the final event.
module tb_trigger_unit;
  import mon_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  trig_cfg_t cfg;
  logic [2:0] q_sel = 3'b101;
  logic arm = 1'b0;
  logic [N_SIG-1:0] sig = '0;
  word_t data = '0;
  logic data_valid = 1'b0;
  ts_t ts = '0;
  logic [2:0] triggers;
  logic rec_en, trig, armed, done, fired;
  ts_t trig_ts;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 32'd1;

  trigger_unit #(.N_Q(3)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cond_cfg_t c_off();
    return '{kind: COND_OFF, sel: '0, mask: '0, refv: '0, lo: '0, hi: '0};
  endfunction

  task automatic clear_cfg();
    for (int i = 0; i < N_COND; i++) cfg.cond[i] = c_off();
    for (int j = 0; j < N_TERM; j++) cfg.term[j] = '0;
    for (int k = 0; k < N_STAGE; k++) cfg.stage[k] = '0;
    cfg.use_seq    = 1'b0;
    cfg.last_stage = '0;
    cfg.pos        = TRIG_POST;
    cfg.post_len   = '0;
  endtask

  task automatic rearm();
    @(negedge clk); arm = 1'b0;
    @(negedge clk); arm = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    int rec_cycles;
    bit a, b, c, expect_t;
    ts_t t_ev;
    clear_cfg();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1: state condition, post-trigger, same-cycle response, window length
    cfg.cond[0] = '{kind: COND_STATE, sel: '0, mask: 32'h0000_0006, refv: 32'h0000_0004, lo: '0, hi: '0};
    cfg.term[0] = '{use_c: 4'b0001, neg_c: 4'b0000};
    cfg.post_len = 32'd5;
    rearm();
    check(armed && !rec_en && !fired, "armed, not recording in post mode");
    sig = 8'b0000_0010;   // bits[2:1] = 01: no match
    #1; check(!trig && !rec_en, "no trigger on mismatch");
    @(negedge clk);
    sig = 8'b1111_0100;   // bits[2:1] = 10: match
    t_ev = ts;
    #1;
    check(trig && rec_en, "fast trigger in the same cycle");
    check(triggers == 3'b101, "queue lines follow q_sel");
    rec_cycles = 0;
    for (int i = 0; i < 12; i++) begin
      @(posedge clk); #1;
      // count enable cycles including the trigger cycle
    end
    // count precisely in a second run below
    check(done && fired, "done after the post-trigger window");
    check(trig_ts == t_ev, "trigger timestamp");
    sig = '0;
    rearm();
    @(negedge clk);
    sig = 8'b0000_0100;
    rec_cycles = 0;
    for (int i = 0; i < 12; i++) begin
      #1; if (rec_en) rec_cycles++;
      @(negedge clk);
    end
    check(rec_cycles == 5, $sformatf("post window %0d cycles, expected 5", rec_cycles));
    check(triggers == 3'b000, "lines low after window");
    sig = '0;

    // ---- 2: rising and falling edge conditions
    clear_cfg();
    cfg.cond[1] = '{kind: COND_RISE, sel: 3'd3, mask: '0, refv: '0, lo: '0, hi: '0};
    cfg.term[1] = '{use_c: 4'b0010, neg_c: 4'b0000};
    cfg.post_len = 32'd1;
    sig = 8'h08;   // high before arming: no edge
    rearm();
    #1; check(!trig, "level is no edge");
    @(negedge clk); sig = 8'h00; #1; check(!trig, "falling is not rising");
    @(negedge clk); sig = 8'h08; #1; check(trig, "rising edge triggers");
    @(negedge clk); #1; check(done && !rec_en, "single-cycle window");
    cfg.cond[1].kind = COND_FALL;
    rearm();
    @(negedge clk); sig = 8'h00; #1; check(trig, "falling edge triggers");
    sig = '0;

    // ---- 3: (A and B) or (not C) on random vectors
    clear_cfg();
    cfg.cond[0] = '{kind: COND_STATE, sel: '0, mask: 32'h1, refv: 32'h1, lo: '0, hi: '0};        // A: sig[0]
    cfg.cond[1] = '{kind: COND_EQ, sel: '0, mask: 32'h0000_00FF, refv: 32'h0000_0042, lo: '0, hi: '0}; // B
    cfg.cond[2] = '{kind: COND_RANGE, sel: '0, mask: '0, refv: '0, lo: 32'd100, hi: 32'd200};    // C
    cfg.term[0] = '{use_c: 4'b0011, neg_c: 4'b0000};
    cfg.term[1] = '{use_c: 4'b0100, neg_c: 4'b0100};
    cfg.post_len = 32'd1;
    for (int n = 0; n < 300; n++) begin
      rearm();
      sig        = 8'($urandom);
      data_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: data = 32'h0000_0042 | ($urandom & 32'hFFFF_FF00);
        1: data = $urandom_range(90, 210);
        default: data = $urandom;
      endcase
      a = sig[0];
      b = data_valid && (data[7:0] == 8'h42);
      c = data_valid && (data >= 100) && (data <= 200);
      expect_t = (a && b) || !c;
      #1;
      check(trig == expect_t, $sformatf("combination a=%0d b=%0d c=%0d trig=%0d", a, b, c, trig));
      check(rec_en == expect_t, "combination record enable");
      @(negedge clk);
      data_valid = 1'b0;
      sig = '0;
    end

    // ---- 4: sequence "A first, then B three times"
    clear_cfg();
    cfg.cond[0] = '{kind: COND_STATE, sel: '0, mask: 32'h1, refv: 32'h1, lo: '0, hi: '0}; // A: sig[0]
    cfg.cond[1] = '{kind: COND_STATE, sel: '0, mask: 32'h2, refv: 32'h2, lo: '0, hi: '0}; // B: sig[1]
    cfg.term[0] = '{use_c: 4'b0001, neg_c: '0};
    cfg.term[1] = '{use_c: 4'b0010, neg_c: '0};
    cfg.use_seq = 1'b1;
    cfg.last_stage = 2'd1;
    cfg.stage[0] = '{term: 1'b0, count: 16'd1};
    cfg.stage[1] = '{term: 1'b1, count: 16'd3};
    cfg.post_len = 32'd2;
    rearm();
    // B pulses before A do not count
    for (int i = 0; i < 4; i++) begin
      sig = 8'h02; @(negedge clk); sig = 8'h00; @(negedge clk);
      #1; check(!trig && !rec_en, "B before A ignored");
    end
    sig = 8'h01; @(negedge clk); sig = 8'h00; @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      sig = 8'h02;
      #1; check(!trig, "no trigger before the last event is registered");
      @(negedge clk); sig = 8'h00;
      #1;
      check(trig == (i == 2), $sformatf("sequence trigger after B #%0d: %0d", i + 1, trig));
      check(rec_en == (i == 2), "sequence enable one cycle after the event");
      @(negedge clk);
    end

    // ---- 5: pre-trigger: record from arming, stop post_len after trigger
    clear_cfg();
    cfg.cond[3] = '{kind: COND_TIME, sel: '0, mask: '0, refv: '0, lo: '0, hi: '0};
    cfg.term[0] = '{use_c: 4'b1000, neg_c: '0};
    cfg.pos = TRIG_PRE;
    cfg.post_len = 32'd4;
    cfg.cond[3].refv = ts + 32'd20;
    rearm();
    rec_cycles = 0;
    for (int i = 0; i < 40; i++) begin
      #1;
      if (rec_en) rec_cycles++;
      if (trig) check(ts == cfg.cond[3].refv, "time condition at the reference time");
      @(negedge clk);
    end
    // armed at ts0+~2: recording from then until trigger + 3 cycles
    check(done, "pre-trigger window closed");
    check(trig_ts == cfg.cond[3].refv, "pre-trigger timestamp");
    check(rec_cycles >= 20 && rec_cycles <= 22, $sformatf("pre-trigger record cycles %0d", rec_cycles));

    // ---- 6: post_len 0 records until disarm
    clear_cfg();
    cfg.cond[0] = '{kind: COND_STATE, sel: '0, mask: 32'h1, refv: 32'h1, lo: '0, hi: '0};
    cfg.term[0] = '{use_c: 4'b0001, neg_c: '0};
    rearm();
    sig = 8'h01; @(negedge clk); sig = 8'h00;
    repeat (50) @(negedge clk);
    #1; check(rec_en && !done, "unlimited window still open");
    arm = 1'b0;
    @(negedge clk); #1;
    check(!rec_en && !armed, "disarm stops recording");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
