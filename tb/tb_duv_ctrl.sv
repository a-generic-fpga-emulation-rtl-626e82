// tb_duv_ctrl: checks the sequencer's chain of events for several configurations
// (input sets, output sets, clock-high cycles): in_ce follows each stimulus word,
// the generated DUV clock is high for exactly clk_high cycles once per stimulus,
// the masters capture once after the clock has fallen, the slaves load once, then
// n_out words are presented on consecutive cycles with the last one flagged, and the
// first result word comes clk_high + 4 cycles after the last stimulus word.
module tb_duv_ctrl;
  logic ckT = 1'b0, rst_n = 1'b0, data_av_i = 1'b0;
  logic [3:0] n_in = 4'd14;
  logic [2:0] n_out = 3'd7;
  logic [7:0] clk_high = 8'd8;
  logic data_av_o, data_last_o, busy, in_ce, out_ce_m, out_load, out_ce_s, duv_clk;
  int checks = 0, failures = 0;

  duv_ctrl #(.IN_SETS(14), .OUT_SETS(7)) dut (.*);
  always #5 ckT = ~ckT;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run(input int ni, input int no, input int hi);
    int t, t_last_in, t_first_out, hi_cnt, cap_cnt, load_cnt, out_cnt, last_cnt, t_cap, t_fall;
    n_in = 4'(ni); n_out = 3'(no); clk_high = 8'(hi);
    @(posedge ckT);
    hi_cnt = 0; cap_cnt = 0; load_cnt = 0; out_cnt = 0; last_cnt = 0; t_first_out = -1;
    t_cap = -1; t_fall = -1;
    for (int k = 0; k < ni; k++) begin
      data_av_i <= 1'b1;
      @(posedge ckT);
      chk(in_ce == 1'b1, "in_ce with each word");
    end
    data_av_i <= 1'b0;
    t_last_in = 0;
    for (t = 1; t < 400; t++) begin
      #1;
      if (duv_clk) hi_cnt++;
      if (!duv_clk && hi_cnt > 0 && t_fall < 0) t_fall = t;
      if (out_ce_m) begin cap_cnt++; t_cap = t; end
      if (out_load) load_cnt++;
      if (data_av_o) begin
        if (t_first_out < 0) t_first_out = t;
        out_cnt++;
        chk(out_ce_s, "slaves shift while presenting words");
      end
      if (data_last_o) begin
        last_cnt++;
        chk(out_cnt == no, "last flag on the final word");
      end
      chk(!in_ce, "no input shift while busy");
      @(posedge ckT);
      if (out_cnt == no && !data_av_o) break;
    end
    chk(hi_cnt == hi, $sformatf("clock high %0d cycles (got %0d)", hi, hi_cnt));
    chk(cap_cnt == 1 && load_cnt == 1, "one capture and one slave load");
    chk(t_cap > t_fall, "capture after the DUV clock has fallen");
    chk(out_cnt == no && last_cnt == 1, "n_out words, one last flag");
    chk(t_first_out == hi + 4, $sformatf("latency %0d (got %0d)", hi + 4, t_first_out));
    chk(!busy, "idle after the unload");
  endtask

  initial begin
    @(posedge ckT); rst_n <= 1'b1;
    run(14, 7, 8);
    run(5, 7, 8);
    run(1, 1, 1);
    run(3, 2, 20);
    run(14, 7, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge ckT);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
