// Testbench for cbm_shifter: one-place arithmetic shift and product read-out.
//
// The shift is checked on random PA values against a signed division-free
// model (sign bit copied, every other bit moved down one place). The
// read-out is checked by building the PA that k Booth steps leave behind
// (the signed product times 2^(16-k) above the unused multiplier bits) for
// random products and every k from 1 to 16, and comparing the returned
// product with the one used to build it.
module tb_cbm_shifter;
  localparam int W = 16, PW = 34;

  logic [PW-1:0]  pa_step, pa, pa_shr;
  logic [4:0]     iters;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  cbm_shifter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic [PW-1:0] v, e;
      v = {$urandom, $urandom};
      pa_step = v; pa = '0; iters = 5'd16;
      #1;
      for (int i = 0; i < PW - 1; i++) e[i] = v[i+1];
      e[PW-1] = v[PW-1];
      checks++;
      if (pa_shr != e) begin
        failures++;
        $display("FAIL shift v=%h got=%h exp=%h", v, pa_shr, e);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      int it;
      longint prod, field;
      logic [W-1:0] junk;
      it   = 1 + ($urandom % W);
      // A product of a k-bit signed multiplier and a 16-bit multiplicand.
      prod = longint'($signed(W'($urandom))) * (longint'($urandom % (1 << it)) - (longint'(1) << (it - 1)));
      junk = W'($urandom) & W'((32'h1 << (W - it)) - 1);
      field = prod * (longint'(1) << (W - it)) + longint'(junk);
      pa_step = '0;
      pa = {PW'(field)} << 1 | PW'($urandom % 2);
      iters = 5'(it);
      #1;
      checks++;
      if (product != 32'(prod)) begin
        failures++;
        $display("FAIL align it=%0d prod=%0d got=%0d", it, prod, $signed(product));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
