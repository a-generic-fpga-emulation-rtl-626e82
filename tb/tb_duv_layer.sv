// tb_duv_layer: the DUV layer at its default size (420 inputs, 193 observed bits)
// around a small test DUV: a 193-bit register that takes inputs 192:0 xor inputs
// 419:227 on each DUV clock edge, plus a counter of DUV clock edges. Each stimulus
// of 14 words must give one DUV clock edge and 7 result words equal to the register
// the reference model predicts; with test_mode low the DUV must take the pins and
// run on the system clock.
module tb_duv_layer;
  localparam int N_IN = 420, N_OUT = 193;
  logic ckT = 1'b0, rst_n = 1'b0, test_mode = 1'b1, data_av_i = 1'b0;
  logic [3:0] n_in = 4'd14;
  logic [2:0] n_out = 3'd7;
  logic [7:0] clk_high = 8'd8;
  logic [31:0] data_i = '0, data_o;
  logic data_av_o, data_last_o, busy, ckDUV;
  logic [N_IN-1:0] pins_in = '0, duv_in;
  logic [N_OUT-1:0] duv_out;
  int checks = 0, failures = 0;

  duv_layer #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);
  always #5 ckT = ~ckT;

  // test DUV
  logic [N_OUT-1:0] r = '0;
  int edges = 0;
  always @(posedge ckDUV) begin
    r <= duv_in[192:0] ^ duv_in[419:227];
    edges++;
  end
  assign duv_out = r;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    @(posedge ckT); rst_n <= 1'b1; @(posedge ckT);
    for (int rep = 0; rep < 5; rep++) begin
      logic [447:0] v;
      logic [N_OUT-1:0] expv;
      logic [223:0] got;
      int e0, k;
      for (int i = 0; i < 14; i++) v[32*i +: 32] = $urandom;
      expv = v[192:0] ^ v[419:227];
      e0 = edges;
      pins_in <= {14{$urandom}};
      for (int i = 0; i < 14; i++) begin
        data_av_i <= 1'b1; data_i <= v[32*i +: 32];
        @(posedge ckT);
      end
      data_av_i <= 1'b0;
      k = 0; got = '0;
      for (int t = 0; t < 100 && k < 7; t++) begin
        #1;
        if (data_av_o) begin got[32*k +: 32] = data_o; k++; end
        @(posedge ckT);
      end
      chk(k == 7, "seven result words");
      chk(got[N_OUT-1:0] == expv, "result words match the DUV model");
      chk(edges == e0 + 1, "one DUV clock edge per stimulus");
    end
    // free-running mode
    test_mode <= 1'b0;
    pins_in <= {14{$urandom}};
    @(posedge ckT);
    begin
      int e0;
      #1 e0 = edges;
      repeat (4) @(posedge ckT);
      #1 chk(edges == e0 + 4, $sformatf("DUV clocked by ckT in free-running mode (%0d edges)", edges - e0));
      chk(r == (pins_in[192:0] ^ pins_in[419:227]), "DUV takes the pins in free-running mode");
    end
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
