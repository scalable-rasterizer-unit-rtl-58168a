// tb_minmax3: shifts random signed values into the 3-tap sorter and checks
// min and max of the last three values one cycle later.
module tb_minmax3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic shift;
  logic signed [15:0] din, vmin, vmax;
  logic signed [15:0] w[3];

  minmax3 #(.W(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    shift = 0; din = 0; w = '{0, 0, 0};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      shift = ($urandom_range(0, 3) != 0);
      din = 16'($urandom);
      if (shift) begin w[2] = w[1]; w[1] = w[0]; w[0] = din; end
      @(negedge clk);
      begin
        logic signed [15:0] mn, mx;
        mn = w[0]; mx = w[0];
        for (int k = 1; k < 3; k++) begin
          if (w[k] < mn) mn = w[k];
          if (w[k] > mx) mx = w[k];
        end
        checks++;
        if (vmin != mn || vmax != mx) begin
          failures++; $display("FAIL %0d: got %0d/%0d want %0d/%0d", i, vmin, vmax, mn, mx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
