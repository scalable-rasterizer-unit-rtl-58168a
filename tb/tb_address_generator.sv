// tb_address_generator: random (segment, triangle) pairs with random memory
// back-pressure. The memory writes go into a sparse array; afterwards every
// segment's list is walked from its head through the link words and must
// hold exactly that segment's triangles in order. Lists longer than 31
// entries exercise block chaining. A second instance with room for only four
// blocks must raise overflow; frame_start must empty all lists.
module tb_address_generator;
  import raster_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, links = 0;
  logic frame_start, seg_valid, seg_ready, mem_wr_valid, mem_wr_ready, q_valid, overflow;
  logic [7:0] seg_x, seg_y, q_seg_x, q_seg_y;
  tri_ptr_t seg_tri;
  logic [19:0] mem_wr_addr, q_head;
  logic [31:0] mem_wr_data;
  logic [TRI_W-1:0] q_count;
  logic [31:0] mem [int];
  int exp_list [int][$];

  // small instance for the overflow check
  logic s_seg_valid, s_seg_ready, s_wv, s_qv, s_ovf;
  logic [6:0] s_wa, s_qh;
  logic [31:0] s_wd;
  logic [TRI_W-1:0] s_qc;
  logic [7:0] s_x;

  address_generator #(.SEGC_W(8), .SXB(5), .SYB(6), .MEM_AW(20), .MEM_DW(32)) dut (.*);
  address_generator #(.SEGC_W(8), .SXB(5), .SYB(6), .MEM_AW(7), .MEM_DW(32)) u_small (
    .clk, .rst_n, .frame_start, .seg_valid(s_seg_valid), .seg_ready(s_seg_ready),
    .seg_x(s_x), .seg_y(8'd0), .seg_tri(tri_ptr_t'(1)),
    .mem_wr_valid(s_wv), .mem_wr_ready(1'b1), .mem_wr_addr(s_wa), .mem_wr_data(s_wd),
    .q_seg_x(8'd0), .q_seg_y(8'd0), .q_valid(s_qv), .q_head(s_qh), .q_count(s_qc), .overflow(s_ovf));

  always @(posedge clk) if (rst_n && mem_wr_valid && mem_wr_ready) begin
    mem[int'(mem_wr_addr)] = mem_wr_data;
    if (mem_wr_addr[4:0] == 5'd31) links++;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    frame_start = 0; seg_valid = 0; mem_wr_ready = 1; seg_x = 0; seg_y = 0; seg_tri = 0;
    q_seg_x = 0; q_seg_y = 0; s_seg_valid = 0; s_x = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int i = 0; i < 1500; i++) begin
      int sx, sy;
      sx = (i % 5 == 0) ? 3 : $urandom_range(0, 7);
      sy = (i % 5 == 0) ? 2 : $urandom_range(0, 3);
      seg_valid = 1; seg_x = 8'(sx); seg_y = 8'(sy); seg_tri = tri_ptr_t'(i + 100);
      mem_wr_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      while (!seg_ready) begin
        #1 mem_wr_ready = ($urandom_range(0, 3) != 0);
        @(posedge clk);
      end
      exp_list[sy * 32 + sx].push_back(i + 100);
      @(negedge clk);
    end
    seg_valid = 0; mem_wr_ready = 1;
    @(negedge clk);
    chk(!overflow, "no overflow");
    chk(links > 0, "block chaining happened");
    // walk the lists
    for (int sy = 0; sy < 4; sy++) for (int sx = 0; sx < 8; sx++) begin
      int a, n;
      q_seg_x = 8'(sx); q_seg_y = 8'(sy); #1;
      n = exp_list.exists(sy * 32 + sx) ? exp_list[sy * 32 + sx].size() : 0;
      chk(int'(q_count) == n && q_valid == (n > 0), $sformatf("count seg %0d,%0d: %0d want %0d", sx, sy, q_count, n));
      a = int'(q_head);
      for (int k = 0, w = 0; k < n; k++, w++) begin
        if (w == 31) begin a = int'(mem[a + 31]); w = 0; end
        chk(mem.exists(a + w) && int'(mem[a + w]) == exp_list[sy * 32 + sx][k], "list entry");
      end
    end
    // overflow on the small instance: 5 segments, room for 4 blocks
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); s_seg_valid = 1; s_x = 8'(i);
    end
    @(negedge clk); s_seg_valid = 0;
    chk(s_ovf, "overflow raised");
    // frame start empties the lists
    frame_start = 1; @(negedge clk); frame_start = 0;
    q_seg_x = 3; q_seg_y = 2; #1;
    chk(!q_valid && q_count == 0 && !s_ovf, "frame start clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
