// tb_walsh_code_mem: checks the codeword table through its read ports.
// Reference codewords are built by the recursive Hadamard construction
// H(2n) = [H H; H ~H] (independent of the parity rule used in the RTL);
// also checks codeword 0 is all zeros, codeword 3 is 01100110, and every
// pair of distinct codewords agrees on exactly half of their chips.
module tb_walsh_code_mem;
  localparam int unsigned AW = 3, L = 8, NRD = 4;
  logic [NRD-1:0][AW-1:0] addr;
  logic [NRD-1:0][L-1:0]  data;
  logic [L-1:0] ref_cw [L];
  logic [L-1:0] got [L];
  int checks = 0, failures = 0;

  walsh_code_mem #(.ADDR_W(AW), .NRD(NRD)) dut (.addr, .data);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // recursive construction, chip i in bit i
    ref_cw[0] = '0;
    for (int n = 1; n < L; n *= 2)
      for (int k = 0; k < n; k++) begin
        logic [L-1:0] r;
        r = ref_cw[k];
        for (int i = 0; i < n; i++) begin
          ref_cw[k][n + i]     = r[i];
          ref_cw[n + k][i]     = r[i];
          ref_cw[n + k][n + i] = ~r[i];
        end
      end
    for (int k = 0; k < L; k += NRD) begin
      for (int r = 0; r < NRD; r++) addr[r] = AW'((k + r * 3) % L);
      #1;
      for (int r = 0; r < NRD; r++) begin
        check(data[r] == ref_cw[addr[r]], $sformatf("codeword %0d: %b expected %b", addr[r], data[r], ref_cw[addr[r]]));
        got[addr[r]] = data[r];
      end
    end
    for (int k = 0; k < L; k++) begin
      addr = '0; addr[k % NRD] = AW'(k); #1; got[k] = data[k % NRD];
    end
    check(got[0] == '0, "codeword 0 is all zeros");
    check(got[3] == 8'b0110_0110, "codeword 3 is 01100110");
    for (int a = 0; a < L; a++)
      for (int b = a + 1; b < L; b++)
        check($countones(got[a] ^ got[b]) == L / 2, $sformatf("codewords %0d and %0d not orthogonal", a, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
