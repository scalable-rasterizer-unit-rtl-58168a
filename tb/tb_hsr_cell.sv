// tb_hsr_cell: drives one cell with random triangles over both of its line
// slots, in opaque mode (random depth function, stencil set-up) and in
// transparent mode (both parities), and compares the whole buffer, read back
// through the readout port, with a sample-by-sample model built from the edge
// equations. Also checks the clear and the line times: SEG_W/2 cycles
// opaque, SEG_W transparent.
module tb_hsr_cell;
  import raster_pkg::*;
  localparam int SEG_W = 32, SLOTS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  depth_cfg_t dcfg;
  sten_cfg_t scfg;
  logic load, clr_start, busy;
  logic [1:0] load_slot, rd_slot, pix_written;
  start_t st;
  edge_t ds0x, ds1x, ds2x;
  depth_t dzx, clr_z;
  tri_ptr_t tri_in;
  logic [3:0] clr_mask;
  sten_t clr_sten;
  logic [4:0] rd_x;
  buf_entry_t rd_data;
  buf_entry_t model [SLOTS][SEG_W];
  int written = 0, hw_written = 0;

  hsr_cell #(.SEG_W(SEG_W), .SLOTS(SLOTS)) dut (.*);

  always @(posedge clk) hw_written += int'(pix_written[0]) + int'(pix_written[1]);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic longint ef(longint xa, longint ya, longint xb, longint yb, longint x, longint y);
    return (x - xa) * (ya - yb) - (y - ya) * (xa - xb);
  endfunction

  function automatic bit ref_cmp(int f, longint a, longint b);
    case (f)
      1: return a < b;  2: return a == b; 3: return a <= b;
      4: return a > b;  6: return a >= b; 7: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int ref_op(int op, int cur, int r);
    case (op)
      0: return cur;  1: return 0;  2: return r;
      3: return cur == 255 ? 255 : cur + 1;
      4: return cur == 0 ? 0 : cur - 1;
      5: return 255 - cur;
      6: return (cur + 1) % 256;
      default: return (cur + 255) % 256;
    endcase
  endfunction

  task automatic compare_all(input string tag);
    for (int s = 0; s < SLOTS; s++)
      for (int x = 0; x < SEG_W; x++) begin
        @(negedge clk); rd_slot = 2'(s); rd_x = 5'(x);
        @(negedge clk);
        chk(rd_data == model[s][x], $sformatf("%s slot %0d x %0d: %h want %h", tag, s, x, rd_data, model[s][x]));
      end
  endtask

  task automatic do_clear(input logic [3:0] m, input depth_t z, input sten_t sv);
    @(negedge clk); clr_start = 1; clr_mask = m; clr_z = z; clr_sten = sv;
    @(negedge clk); clr_start = 0;
    while (busy) @(negedge clk);
    for (int s = 0; s < SLOTS; s++) for (int x = 0; x < SEG_W; x++) begin
      if (m[CLR_Z0]) model[s][x].z0 = z;
      if (m[CLR_Z1]) model[s][x].z1 = z;
      if (m[CLR_STEN]) model[s][x].sten = sv;
      if (m[CLR_TRI]) model[s][x].tri_id = '0;
    end
  endtask

  // One triangle over one line, then check the buffer.
  task automatic run_line(input int slot, input int t);
    longint x[3], y[3], z[3], ys, xs, az, bz, cz, zs, dz;
    int cycles;
    for (int k = 0; k < 3; k++) begin
      x[k] = $urandom_range(0, 16 * 40); y[k] = $urandom_range(0, 16 * 8);
      z[k] = $urandom_range(0, 24'hFFFFF) + 24'h400000;
    end
    xs = 8; ys = 8 + slot * 16 * 2;
    az = (z[1] - z[2]) * (y[1] - y[0]) - (y[1] - y[2]) * (z[1] - z[0]);
    cz = (x[1] - x[2]) * (y[1] - y[0]) - (y[1] - y[2]) * (x[1] - x[0]);
    bz = (x[1] - x[2]) * (z[1] - z[0]) - (z[1] - z[2]) * (x[1] - x[0]);
    if (cz == 0) begin zs = z[1]; dz = 0; end
    else begin zs = z[1] + (az * (xs - x[1]) + bz * (ys - y[1])) / cz; dz = (az * PIX) / cz; end
    @(negedge clk);
    load = 1; load_slot = 2'(slot); tri_in = tri_ptr_t'(t + 1);
    st.s0 = edge_t'(ef(x[0], y[0], x[1], y[1], xs, ys));
    st.s1 = edge_t'(ef(x[0], y[0], x[2], y[2], xs, ys));
    st.s2 = edge_t'(ef(x[1], y[1], x[2], y[2], xs, ys));
    st.z = depth_t'(zs);
    ds0x = edge_t'(PIX * (y[0] - y[1])); ds1x = edge_t'(PIX * (y[0] - y[2])); ds2x = edge_t'(PIX * (y[1] - y[2]));
    dzx = depth_t'(dz);
    @(negedge clk); load = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
    chk(cycles == (dcfg.transparent ? SEG_W : SEG_W / 2) + 2,
        $sformatf("line time %0d", cycles));
    // model
    for (int i = 0; i < SEG_W; i++) begin
      longint px, e0, e1, e2, zi;
      bit cov, zp, sp;
      int op, sn;
      buf_entry_t o;
      px = xs + i * PIX;
      e0 = ef(x[0], y[0], x[1], y[1], px, ys);
      e1 = ef(x[0], y[0], x[2], y[2], px, ys);
      e2 = ef(x[1], y[1], x[2], y[2], px, ys);
      cov = ((e0 < 0) != (e1 < 0)) && ((e1 < 0) != (e2 < 0));
      zi = (zs + i * dz) & 24'hFFFFFF;
      o = model[slot][i];
      if (!cov) continue;
      if (dcfg.transparent) begin
        longint pr, wk;
        pr = dcfg.parity ? o.z1 : o.z0; wk = dcfg.parity ? o.z0 : o.z1;
        zp = zi < pr && zi > wk;
      end else zp = ref_cmp(int'(dcfg.zfunc), zi, o.z0);
      sp = ref_cmp(int'(scfg.func), scfg.ref_val & scfg.rmask, o.sten & scfg.rmask);
      op = !sp ? int'(scfg.op_sfail) : (!zp ? int'(scfg.op_zfail) : int'(scfg.op_zpass));
      sn = ref_op(op, o.sten, scfg.ref_val);
      o.sten = sten_t'((o.sten & ~scfg.wmask) | (sn & scfg.wmask));
      if (zp && sp) begin
        written++;
        o.tri_id = tri_ptr_t'(t + 1);
        if (dcfg.transparent) begin
          if (dcfg.parity) o.z0 = depth_t'(zi); else o.z1 = depth_t'(zi);
        end else if (dcfg.zwrite) o.z0 = depth_t'(zi);
      end
      model[slot][i] = o;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; clr_start = 0; load_slot = 0; rd_slot = 0; rd_x = 0; st = '0;
    ds0x = 0; ds1x = 0; ds2x = 0; dzx = 0; tri_in = 0; clr_mask = 0; clr_z = 0; clr_sten = 0;
    dcfg = '0; dcfg.zfunc = CMP_LESS; dcfg.zwrite = 1;
    scfg = '0; scfg.func = CMP_ALWAYS; scfg.rmask = 8'hFF; scfg.wmask = 8'hFF;
    repeat (3) @(negedge clk); rst_n = 1;
    do_clear(4'b1111, 24'hFFFFFF, 8'h00);
    compare_all("after clear");
    // opaque, plain depth test
    for (int t = 0; t < 12; t++) run_line(t % 2, t);
    compare_all("opaque less");
    // opaque with random functions and stencil operations
    for (int t = 12; t < 60; t++) begin
      dcfg.zfunc = cmp_func_e'(3'($urandom)); dcfg.zwrite = 1'($urandom);
      scfg.func = cmp_func_e'(3'($urandom)); scfg.ref_val = 8'($urandom_range(0, 3));
      scfg.rmask = 8'h03; scfg.wmask = ($urandom_range(0, 1) != 0) ? 8'hFF : 8'h0F;
      scfg.op_sfail = sten_op_e'(3'($urandom)); scfg.op_zfail = sten_op_e'(3'($urandom));
      scfg.op_zpass = sten_op_e'(3'($urandom));
      run_line(t % 2, t);
    end
    compare_all("opaque random");
    // transparent passes
    scfg.func = CMP_ALWAYS; scfg.op_sfail = SOP_KEEP; scfg.op_zfail = SOP_KEEP; scfg.op_zpass = SOP_KEEP;
    dcfg.transparent = 1;
    for (int p = 0; p < 2; p++) begin
      dcfg.parity = 1'(p);
      do_clear(p ? 4'b1001 : 4'b1010, 24'h000000, 8'h00);
      for (int t = 60 + p * 20; t < 80 + p * 20; t++) run_line(t % 2, t);
      compare_all($sformatf("transparent pass %0d", p));
    end
    chk(written > 0 && hw_written == written, $sformatf("written %0d/%0d", hw_written, written));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
