// Self-checking testbench for signature_checker.
//
// Replays the worked example (m = 5, tolerance 1 LSB each side, L = 256:
// residue 9 is faulty, 255 is not), then sweeps every residue for random
// m and tolerances on both moduli and compares `fault` with the condition
// m*dhat < R < L - m*dcheck evaluated here in integers.
module tb_signature_checker;
  import conc_test_pkg::*;
  localparam int N = 8;
  localparam int CW = 16;

  logic [N-1:0]  residue = '0;
  logic [CW-1:0] m_count = '0;
  logic [N-1:0]  dhat = '0, dcheck = '0;
  logic [CW+N:0] lo_a, hi_a, lo_b, hi_b;
  logic          fault_a, fault_b;

  int checks = 0;
  int failures = 0;

  signature_checker #(.N(N), .CW(CW), .MODULUS(MOD_2N)) dut_a (
    .residue, .m_count, .dhat, .dcheck, .lo_bound(lo_a), .hi_bound(hi_a), .fault(fault_a));
  signature_checker #(.N(N), .CW(CW), .MODULUS(MOD_2N_M1)) dut_b (
    .residue, .m_count, .dhat, .dcheck, .lo_bound(lo_b), .hi_bound(hi_b), .fault(fault_b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s R=%0d m=%0d dhat=%0d dcheck=%0d fa=%0b fb=%0b", what, residue, m_count, dhat, dcheck, fault_a, fault_b);
    end
  endtask

  function automatic bit ref_fault(int r, int m, int dh, int dc, int l);
    int rn = (r == l) ? 0 : r;
    return (rn > m * dh) && (rn < l - m * dc);
  endfunction

  task automatic sweep(input int m, input int dh, input int dc);
    m_count = CW'(m); dhat = N'(dh); dcheck = N'(dc);
    for (int r = 0; r < 256; r++) begin
      residue = N'(r);
      #1;
      check(fault_a == ref_fault(r, m, dh, dc, 256), "fault, L=2^N");
      check(fault_b == ref_fault(r, m, dh, dc, 255), "fault, L=2^N-1");
    end
  endtask

  initial begin
    m_count = 5; dhat = 1; dcheck = 1;
    residue = 9;   #1; check(fault_a, "example: residue 9 faulty");
    residue = 255; #1; check(!fault_a, "example: residue 255 fault-free");
    residue = 5;   #1; check(!fault_a, "m*dhat itself is fault-free");
    residue = 6;   #1; check(fault_a, "just above m*dhat is faulty");
    residue = 250; #1; check(fault_a, "just below L-m*dcheck is faulty");
    residue = 251; #1; check(!fault_a, "L-m*dcheck itself is fault-free");
    check(lo_a == 5 && hi_a == 251, "example bounds 5 and 251");
    sweep(5, 1, 1);
    sweep(1, 0, 0);
    sweep(5, 0, 1);
    sweep(200, 1, 1);
    for (int k = 0; k < 30; k++) sweep($urandom_range(1, 60), $urandom_range(3), $urandom_range(3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
