// tb_sdf_buffer: checks the feedback memory as a delay of DEPTH enabled
// cycles (DEPTH = 5, and DEPTH = 1 as in the last stage): with random enable
// gaps, dout must equal the word written DEPTH writes earlier.
module tb_sdf_buffer;
  logic clk = 1'b0, rst_n = 1'b0, en;
  always #5 clk = ~clk;
  logic [15:0] din, dout5, dout1;

  sdf_buffer #(.DEPTH(5), .W(16)) u5 (.clk, .rst_n, .en, .din, .dout(dout5));
  sdf_buffer #(.DEPTH(1), .W(16)) u1 (.clk, .rst_n, .en, .din, .dout(dout1));

  int checks = 0, failures = 0;
  logic [15:0] hist [$];

  initial begin
    en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en  = ($urandom_range(3) != 0);
      din = 16'($urandom);
      if (en) begin
        if (hist.size() >= 5) begin
          checks++;
          if (dout5 != hist[hist.size() - 5]) begin
            failures++;
            $display("FAIL depth 5 at write %0d", hist.size());
          end
        end
        if (hist.size() >= 1) begin
          checks++;
          if (dout1 != hist[hist.size() - 1]) failures++;
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
