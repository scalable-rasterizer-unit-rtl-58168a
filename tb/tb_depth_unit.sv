// tb_depth_unit: checks depth interpolation along a line in both lane modes,
// every opaque comparison function, and the transparent two-location test
// with both parities.
module tb_depth_unit;
  import raster_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load, step, two_lane, wr_loc;
  depth_t z_in, dz_in;
  depth_t z_lane[2], cmp_z[2], stored0[2], stored1[2];
  depth_cfg_t cfg;
  logic [1:0] pass;

  depth_unit dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit ref_cmp(int f, longint a, longint b);
    case (f)
      1: return a < b;  2: return a == b; 3: return a <= b;
      4: return a > b;  6: return a >= b; 7: return 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; step = 0; two_lane = 1; cfg = '0;
    cmp_z = '{0, 0}; stored0 = '{0, 0}; stored1 = '{0, 0};
    // interpolation
    for (int t = 0; t < 50; t++) begin
      longint z0, dz;
      z0 = $urandom_range(0, 24'hFFFFFF); dz = $urandom_range(0, 24'hFFFFFF);
      two_lane = t[0];
      @(negedge clk); load = 1; z_in = 24'(z0); dz_in = 24'(dz);
      @(negedge clk); load = 0; step = 1;
      for (int i = 0; i < 32; i += (two_lane ? 2 : 1)) begin
        chk(z_lane[0] == 24'(z0 + i * dz), "lane 0 depth");
        if (two_lane) chk(z_lane[1] == 24'(z0 + (i + 1) * dz), "lane 1 depth");
        @(negedge clk);
      end
      step = 0;
    end
    // opaque comparisons
    for (int t = 0; t < 4000; t++) begin
      int f;
      f = $urandom_range(0, 7);
      cfg.transparent = 0; cfg.zfunc = cmp_func_e'(3'(f));
      for (int l = 0; l < 2; l++) begin
        stored0[l] = 24'($urandom_range(0, 15)); cmp_z[l] = 24'($urandom_range(0, 15));
        stored1[l] = 24'($urandom);
      end
      #1;
      for (int l = 0; l < 2; l++)
        chk(pass[l] == ref_cmp(f, cmp_z[l], stored0[l]), $sformatf("opaque f=%0d", f));
      chk(wr_loc == 0, "opaque writes location 0");
    end
    // transparent passes
    for (int t = 0; t < 4000; t++) begin
      cfg.transparent = 1; cfg.parity = 1'(t);
      for (int l = 0; l < 2; l++) begin
        stored0[l] = 24'($urandom_range(0, 15)); stored1[l] = 24'($urandom_range(0, 15));
        cmp_z[l] = 24'($urandom_range(0, 15));
      end
      #1;
      for (int l = 0; l < 2; l++) begin
        longint pr, wk;
        pr = cfg.parity ? stored1[l] : stored0[l];
        wk = cfg.parity ? stored0[l] : stored1[l];
        chk(pass[l] == (cmp_z[l] < pr && cmp_z[l] > wk), "transparent test");
      end
      chk(wr_loc == !cfg.parity, "transparent writes working location");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
