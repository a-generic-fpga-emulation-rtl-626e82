// tb_scan_in_chain: loads the default 420-input chain (14 sets) with random words and
// checks that after exactly 14 cycles every DUV input carries its bit (word k in
// set k), that a shorter configured length places its words in sets 0..len-1, that
// the chain holds while ce is low, and that test_mode low selects the pins.
module tb_scan_in_chain;
  localparam int N_IN = 420;
  localparam int SETS = 14;
  logic ckT = 1'b0, rst_n = 1'b0, ce = 1'b0, test_mode = 1'b1;
  logic [3:0]  len = 4'(SETS);
  logic [31:0] word_in = '0;
  logic [N_IN-1:0] pins = '0, duv_in;
  logic [SETS*32-1:0] exp_v;
  int checks = 0, failures = 0, cycles;

  scan_in_chain #(.N_IN(N_IN)) dut (.*);
  always #5 ckT = ~ckT;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    @(posedge ckT); rst_n <= 1'b1; @(posedge ckT);
    for (int rep = 0; rep < 3; rep++) begin
      cycles = 0;
      for (int k = 0; k < SETS; k++) begin
        logic [31:0] w;
        w = $urandom;
        exp_v[32*k +: 32] = w;
        ce <= 1'b1; word_in <= w;
        @(posedge ckT); cycles++;
      end
      ce <= 1'b0; word_in <= $urandom;
      #1 chk(duv_in == exp_v[N_IN-1:0], "full chain contents after 14 words");
      chk(cycles == SETS, "one word per cycle");
      repeat (3) @(posedge ckT);
      #1 chk(duv_in == exp_v[N_IN-1:0], "chain holds with ce low");
      pins = {14{$urandom}};
      test_mode = 1'b0;
      #1 chk(duv_in == pins, "pins selected with test_mode low");
      test_mode = 1'b1;
      #1 chk(duv_in == exp_v[N_IN-1:0], "scan values selected with test_mode high");
    end
    // shorter configured chain: 5 sets
    len = 4'd5;
    for (int k = 0; k < 5; k++) begin
      logic [31:0] w;
      w = $urandom;
      exp_v[32*k +: 32] = w;
      ce <= 1'b1; word_in <= w;
      @(posedge ckT);
    end
    ce <= 1'b0;
    #1 chk(duv_in[159:0] == exp_v[159:0], "5-set configured chain contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge ckT);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
