// tb_vertex_fifo: random pushes and pops against a queue model; checks order,
// the full flag at 64 words and the empty flag.
module tb_vertex_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [32:0] in_data, out_data;
  logic [6:0] level;
  logic [32:0] q[$];

  vertex_fifo #(.WIDTH(33), .DEPTH(64)) dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // fill completely
    for (int i = 0; i < 64; i++) begin
      in_valid = 1; in_data = 33'(i * 7 + 1);
      @(negedge clk);
      q.push_back(33'(i * 7 + 1));
    end
    in_valid = 0; @(negedge clk);
    chk(!in_ready && level == 64, "full after 64 pushes");
    // random traffic
    for (int c = 0; c < 4000; c++) begin
      in_valid = $urandom_range(0, 1); out_ready = $urandom_range(0, 1);
      in_data = {$urandom, 1'b0} ^ 33'(c);
      #1;
      if (out_valid && out_ready) begin
        chk(q.size() > 0 && out_data == q[0], "order");
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
      chk(out_valid == (q.size() > 0 || (in_valid && in_ready && 0)), "valid flag") ;
      @(negedge clk);
      chk(level == 7'(q.size()), "level");
    end
    in_valid = 0; out_ready = 1;
    while (q.size() > 0) begin
      #1; chk(out_valid && out_data == q[0], "drain"); void'(q.pop_front()); @(negedge clk);
    end
    chk(!out_valid, "empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
