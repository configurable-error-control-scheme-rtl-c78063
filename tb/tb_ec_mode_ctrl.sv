// tb_ec_mode_ctrl - self-checking test of the policy decoder.
//
// Every policy code and flit type is applied and compared with the policy
// table (header / payload treatment of policies I..V).
module tb_ec_mode_ctrl;
  import ecc_pkg::*;

  int checks = 0, failures = 0;
  policy_e policy;
  logic    is_head, cdn, sen;

  ec_mode_ctrl dut (.policy (policy), .is_head (is_head), .cor_det_n (cdn), .ss_ee_n (sen));

  // expected {cor_det_n, ss_ee_n}, index [policy-1][is_head]
  localparam logic [1:0] EXP [5][2] = '{
    '{2'b11, 2'b11},   // I
    '{2'b01, 2'b11},   // II
    '{2'b00, 2'b11},   // III
    '{2'b01, 2'b01},   // IV
    '{2'b00, 2'b01}    // V
  };

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 1; p <= 5; p++)
      for (int h = 0; h < 2; h++) begin
        policy  = policy_e'(p);
        is_head = 1'(h);
        #1;
        checks++;
        if ({cdn, sen} != EXP[p-1][h]) begin
          failures++;
          $display("FAIL policy %0d head %0d got %b%b", p, h, cdn, sen);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
