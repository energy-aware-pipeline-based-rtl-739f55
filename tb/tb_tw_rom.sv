// tb_tw_rom: reads all 512 slots of the ROMs of data paths 1 (default) and 5
// and compares them with W_4096^(t*bitrev3(path)) in Q1.14 (within 1 LSB);
// then switches each bank off in turn and checks that exactly the slots of
// that bank read zero.
module tb_tw_rom;
  import rmr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic [8:0] addr;
  logic [5:0] bank_on;
  cplx_t      w1, w5;
  int checks = 0, failures = 0;
  tw_rom            u1 (.addr(addr), .bank_on(bank_on), .w(w1));
  tw_rom #(.PATH(5)) u5 (.addr(addr), .bank_on(bank_on), .w(w5));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int bank_of(int t);
    for (int b = 0; b < 5; b++) if (((t >> b) & 1) == 1) return b;
    return 5;
  endfunction
  task automatic cmp(cplx_t w, int p, bit off);
    real a = 2.0 * PI * real'(p % 4096) / 4096.0;
    real er = off ? 0.0 : $cos(a) * 16384.0, ei = off ? 0.0 : -$sin(a) * 16384.0;
    checks++;
    if ((er - real'(w.re)) ** 2 > 1.0 ** 2 || (ei - real'(w.im)) ** 2 > 1.0 ** 2) begin
      failures++;
      $display("FAIL addr %0d p %0d: (%0d,%0d) want (%0.1f,%0.1f)", addr, p, w.re, w.im, er, ei);
    end
  endtask
  initial begin
    for (int off = -1; off < 6; off++) begin
      bank_on = 6'h3f;
      if (off >= 0) bank_on[off] = 1'b0;
      for (int t = 0; t < 512; t++) begin
        addr = 9'(t);
        #1;
        cmp(w1, t * 4, bank_of(t) == off);   // bitrev3(1) = 4
        cmp(w5, t * 5, bank_of(t) == off);   // bitrev3(5) = 5
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
