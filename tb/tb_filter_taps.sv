// tb_filter_taps: checks the tapped delay line. Random complex samples are
// offered with a random enable; after every edge the taps must equal the last
// L enabled samples (tap 0 being the current input), and nothing may move on
// a cycle without enable. Reset must clear the line.
module tb_filter_taps;
  import dsic_pkg::*;

  localparam int L = 3;
  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b0;
  csig_t x = '0;
  csig_t taps [L];
  csig_t hist [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  filter_taps #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x_i(x), .taps_o(taps));

  initial begin
    for (int k = 0; k < L; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      x  = csig_t'($urandom);
      en = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (taps[0] != x) failures++;
      for (int k = 1; k < L; k++) begin
        checks++;
        if (taps[k] != hist[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: n=%0d tap %0d = %h expected %h", n, k, taps[k], hist[k]);
        end
      end
      @(posedge clk);
      if (en) begin
        for (int k = L - 1; k >= 1; k--) hist[k] = hist[k-1];
        hist[1] = x;
      end
      #1;
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    for (int k = 1; k < L; k++) begin
      checks++;
      if (taps[k] != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
