// tb_shared_sbox: random data/key request pairs through the shared S-box.
// Checks the collision flag (same top two bits), the grants (key first on a
// collision) and both substituted bytes against the reference S-box.
module tb_shared_sbox;
  import aes_ref_pkg::*;

  logic d_req, k_req, d_gnt, k_gnt, collision;
  logic [7:0] d_in, k_in, d_out, k_out;
  int checks = 0, failures = 0, ncoll = 0;

  shared_sbox dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s: d=%02x k=%02x dreq=%0b kreq=%0b", what, d_in, k_in, d_req, k_req);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      d_in  = 8'($urandom);
      k_in  = 8'($urandom);
      d_req = ($urandom % 4) != 0;
      k_req = ($urandom % 3) != 0;
      #1;
      begin
        logic exp_c;
        exp_c = d_req && k_req && (d_in[7:6] == k_in[7:6]);
        if (exp_c) ncoll++;
        chk(collision == exp_c, "collision");
        chk(k_gnt == k_req, "k_gnt");
        chk(d_gnt == (d_req && !exp_c), "d_gnt");
        if (k_gnt) chk(k_out == r_sbox(k_in), "k_out");
        if (d_gnt) chk(d_out == r_sbox(d_in), "d_out");
      end
    end
    chk(ncoll > 100, "collisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
