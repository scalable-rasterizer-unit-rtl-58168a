// tb_stencil_unit: random configurations and stored values; the expected
// test result and new value are worked out with plain integer arithmetic.
module tb_stencil_unit;
  import raster_pkg::*;
  int checks = 0, failures = 0;
  sten_cfg_t cfg;
  sten_t stored, sten_new;
  logic depth_pass, sten_pass;
  int op_seen[8];

  stencil_unit dut (.*);

  function automatic bit ref_cmp(int f, int a, int b);
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

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int f, r, rm, wm, s, op, res, want;
      bit p;
      f = $urandom_range(0, 7); r = $urandom_range(0, 255);
      rm = ($urandom_range(0, 1) != 0) ? 255 : $urandom_range(0, 255);
      wm = ($urandom_range(0, 1) != 0) ? 255 : $urandom_range(0, 255);
      s = (i % 4 == 0) ? r : ((i % 4 == 1) ? 255 * $urandom_range(0, 1) : $urandom_range(0, 255));
      cfg.func = cmp_func_e'(3'(f)); cfg.ref_val = 8'(r); cfg.rmask = 8'(rm); cfg.wmask = 8'(wm);
      cfg.op_sfail = sten_op_e'(3'($urandom)); cfg.op_zfail = sten_op_e'(3'($urandom));
      cfg.op_zpass = sten_op_e'(3'($urandom));
      stored = 8'(s); depth_pass = 1'($urandom);
      #1;
      p = ref_cmp(f, r & rm, s & rm);
      op = !p ? int'(cfg.op_sfail) : (!depth_pass ? int'(cfg.op_zfail) : int'(cfg.op_zpass));
      op_seen[op]++;
      res = ref_op(op, s, r);
      want = (s & ~wm & 255) | (res & wm);
      checks++;
      if (sten_pass != p || int'(sten_new) != want) begin
        failures++;
        $display("FAIL f=%0d ref=%0d s=%0d op=%0d: pass %0b/%0b new %0d/%0d", f, r, s, op, sten_pass, p, sten_new, want);
      end
    end
    for (int k = 0; k < 8; k++) begin checks++; if (op_seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
