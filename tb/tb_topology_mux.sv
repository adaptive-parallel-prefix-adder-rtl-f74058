// tb_topology_mux: self-checking testbench of the one-hot result multiplexer.
//
// Each of the three adder inputs carries its own random (sum, cout); for every
// legal selection (none, BA, SA, KA) the output must equal the selected pair,
// or zero with no flag set. 500 random rounds of the four selections.
module tb_topology_mux;
  logic       ba, sa, ka;
  logic [3:0] bk_sum, sk_sum, ks_sum, sum;
  logic       bk_cout, sk_cout, ks_cout, cout;
  int checks = 0, failures = 0;

  topology_mux dut (.*);

  initial begin
    for (int r = 0; r < 500; r++) begin
      {bk_sum, bk_cout} = 5'($urandom);
      {sk_sum, sk_cout} = 5'($urandom);
      {ks_sum, ks_cout} = 5'($urandom);
      for (int s = 0; s < 4; s++) begin
        logic [4:0] exp;
        ba = (s == 1); sa = (s == 2); ka = (s == 3);
        case (s)
          1:       exp = {bk_sum, bk_cout};
          2:       exp = {sk_sum, sk_cout};
          3:       exp = {ks_sum, ks_cout};
          default: exp = '0;
        endcase
        #1;
        checks++;
        if ({sum, cout} !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d got %h_%b exp %h", s, sum, cout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
