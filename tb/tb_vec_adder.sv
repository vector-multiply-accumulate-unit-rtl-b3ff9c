// tb_vec_adder: random check of the segmented adder in all three layouts.
// Each element's sum must equal a+b+cin of that element (carry-in taken at
// the element's lowest quarter) and the carry-out must appear at the
// element's top quarter; no carry may cross an element boundary.
module tb_vec_adder;
  import vmac_pkg::*;
  layout_e     mode;
  logic [31:0] a, b, sum;
  logic [3:0]  cin, cout;
  int checks = 0, failures = 0;
  vec_adder dut (.mode(mode), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  initial begin
    for (int t = 0; t < 600; t++) begin
      int ne, ew, q;
      mode = layout_e'(t % 3);
      a = $urandom; b = $urandom; cin = 4'($urandom);
      if (t % 7 == 0) b = ~a;   // long carry chains
      #1;
      ne = nelem(mode); ew = 32 / ne; q = 4 / ne;
      for (int e = 0; e < ne; e++) begin
        longint unsigned ae, be, se;
        ae = (a >> (e * ew)) & ((64'd1 << ew) - 1);
        be = (b >> (e * ew)) & ((64'd1 << ew) - 1);
        se = ae + be + cin[e * q];
        checks++;
        if (((sum >> (e * ew)) & ((64'd1 << ew) - 1)) != (se & ((64'd1 << ew) - 1)) ||
            cout[e * q + q - 1] != se[ew]) begin
          failures++;
          $display("FAIL mode=%0d e=%0d a=%h b=%h cin=%b sum=%h cout=%b", mode, e, a, b, cin, sum, cout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
