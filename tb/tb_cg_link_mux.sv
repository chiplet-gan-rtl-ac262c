// Self-checking test of the topology multiplexer/demultiplexer: with random traffic on all
// sides, the selected partner and endpoint see each other's flits and credits, the other
// partner sees an idle link.
module tb_cg_link_mux;
  import cg_pkg::*;
  logic sel;
  link_t e_out, e_in, p_out [2], p_in [2];
  logic [NUM_VC-1:0] e_credit_out, e_credit_in, p_credit_out [2], p_credit_in [2];
  int checks = 0, failures = 0;

  cg_link_mux dut (.*);

  function automatic link_t rand_link();
    link_t l;
    l.valid = 1'b1;
    l.flit.ftype = flit_type_e'($urandom % 3);
    l.flit.vc = VCW'($urandom);
    for (int w = 0; w < FLIT_W / 32; w++) l.flit.data[w * 32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (sel=%0d)", what, sel); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel = t[0] ^ t[3];
      e_out = rand_link(); p_out[0] = rand_link(); p_out[1] = rand_link();
      e_credit_out = NUM_VC'($urandom | 1);
      p_credit_out[0] = NUM_VC'($urandom); p_credit_out[1] = NUM_VC'($urandom);
      #1;
      expect_true("e_in from selected partner", e_in == p_out[sel]);
      expect_true("credits to e from selected partner", e_credit_in == p_credit_out[sel]);
      expect_true("selected partner gets e's flit", p_in[sel] == e_out);
      expect_true("selected partner gets e's credits", p_credit_in[sel] == e_credit_out);
      expect_true("other partner idle", !p_in[!sel].valid && p_credit_in[!sel] == '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
