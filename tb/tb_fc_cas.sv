// tb_fc_cas: checks both comparator-and-swap directions (+BM[2], -BM[2])
// on random buses and on equal distances. The expected outputs are worked
// out from min/max of the distance fields; the payload bits must follow
// their distance.
module tb_fc_cas;
  localparam int unsigned B = 8;
  localparam int unsigned W = 2 * B + 1;

  logic [W-1:0] a, b, lo_up, hi_up, lo_dn, hi_dn;
  int checks = 0, failures = 0;

  fc_cas #(.B(B), .DESCEND(1'b0)) u_up (.a, .b, .lo(lo_up), .hi(hi_up));
  fc_cas #(.B(B), .DESCEND(1'b1)) u_dn (.a, .b, .lo(lo_dn), .hi(hi_dn));

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h expected %h", what, a, b, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] mn, mx;
      a = W'($urandom);
      b = W'($urandom);
      if (t % 10 == 0) b[B-1:0] = a[B-1:0];
      #1;
      if (a[B-1:0] <= b[B-1:0]) begin mn = a; mx = b; end
      else begin mn = b; mx = a; end
      if (a[B-1:0] == b[B-1:0]) begin
        // Equal keys: either order is a valid sort; the unit keeps them.
        check(lo_up, a, "+BM lo (tie)");
        check(hi_up, b, "+BM hi (tie)");
        check(lo_dn, a, "-BM lo (tie)");
        check(hi_dn, b, "-BM hi (tie)");
      end else begin
        check(lo_up, mn, "+BM lo");
        check(hi_up, mx, "+BM hi");
        check(lo_dn, mx, "-BM lo");
        check(hi_dn, mn, "-BM hi");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
