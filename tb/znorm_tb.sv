// znorm_tb: random samples, means and inverse standard deviations, plus
// values that must saturate, compared with the fixed-point formula
// z = sat(((x - mean) * inv_std) >> INV_FRAC).
module znorm_tb;
  import cdtw_pkg::*;
  import cdtw_ref_pkg::*;
  sample_t x;
  stat_t   st;
  znorm_t  z;
  int checks = 0, failures = 0;

  znorm dut (.x, .st, .z);

  task automatic one(int xv, int mv, int iv);
    int e;
    x = sample_t'(xv); st.mean = sample_t'(mv); st.inv_std = INV_W'(iv);
    #1;
    e = ref_z(int'(x), int'(st.mean), int'(st.inv_std));
    checks++;
    if (int'(z) != e) begin
      failures++;
      $display("x=%0d mean=%0d inv=%0d: z=%0d expected %0d", x, st.mean, st.inv_std, z, e);
    end
  endtask

  initial begin
    one(100, 0, 1 << 16);          // inv_std = 1.0 in 2^16 units: z = x
    one(-100, 0, 1 << 16);
    one(32767, -32768, 24'hffffff); // saturates high
    one(-32768, 32767, 24'hffffff); // saturates low
    for (int i = 0; i < 2000; i++)
      one($signed($urandom) % 32768, $signed($urandom) % 4096, $urandom % (1 << 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
