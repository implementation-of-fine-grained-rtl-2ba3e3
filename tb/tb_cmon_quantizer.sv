// tb_cmon_quantizer: self-checking test of the usage-level quantizer.
//
// Two instances, four levels and two levels, get random counts and cutoffs
// plus the exact cutoff boundaries. The expected level is computed in closed
// form, min(LEVELS-1, floor(count*LEVELS / (2*cutoff))), with LEVELS-1 for a
// zero cutoff, which is independent of the loop of comparisons in the design.
module tb_cmon_quantizer;
  localparam int unsigned CNT_W = 20;

  logic [CNT_W-1:0] count, cutoff;
  logic [1:0] level4;
  logic [0:0] level2;
  int checks = 0, failures = 0;

  cmon_quantizer #(.CNT_W(CNT_W), .LEVELS(4)) u_q4 (.count, .cutoff, .level(level4));
  cmon_quantizer #(.CNT_W(CNT_W), .LEVELS(2)) u_q2 (.count, .cutoff, .level(level2));

  function automatic int unsigned ref_level(longint unsigned c, longint unsigned k, int unsigned L);
    longint unsigned q;
    if (k == 0) return L - 1;
    q = (c * L) / (2 * k);
    return (q > L - 1) ? L - 1 : int'(q);
  endfunction

  task automatic check_one(int unsigned c, int unsigned k);
    count  = CNT_W'(c);
    cutoff = CNT_W'(k);
    #1;
    checks += 2;
    if (level4 != 2'(ref_level(count, cutoff, 4))) begin
      failures++;
      $display("FAIL L4 count=%0d cutoff=%0d level=%0d exp=%0d", count, cutoff, level4,
               ref_level(count, cutoff, 4));
    end
    if (level2 != 1'(ref_level(count, cutoff, 2))) begin
      failures++;
      $display("FAIL L2 count=%0d cutoff=%0d level=%0d exp=%0d", count, cutoff, level2,
               ref_level(count, cutoff, 2));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // boundaries around C/2, C and 3C/2 for C = 1000: levels 0,1,1,2,2,3
    check_one(499, 1000);  check_one(500, 1000);
    check_one(999, 1000);  check_one(1000, 1000);
    check_one(1499, 1000); check_one(1500, 1000);
    check_one(0, 0);       check_one(0, 1);
    check_one(20'hFFFFF, 20'hFFFFF);
    for (int i = 0; i < 5000; i++) begin
      int unsigned k = $urandom_range(0, 4096);
      check_one($urandom_range(0, 8192), k);
    end
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
