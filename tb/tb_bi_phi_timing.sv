// tb_bi_phi_timing: random BI strip hits and end times; the expected phi bin
// of each two-ended hit is computed from the time difference in the
// testbench (linear map of [-64, 63] onto 48 bins).
module tb_bi_phi_timing;
  logic [47:0] a, b, eta;
  logic [47:0][7:0] ta, tb;
  logic [47:0] phi;
  int checks = 0, failures = 0;

  bi_phi_timing #(.NSTRIP(48), .NPHI(48), .DT_RANGE(64)) dut (
    .hit_a(a), .hit_b(b), .time_a(ta), .time_b(tb), .eta_hits(eta), .phi_bins(phi));

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [47:0] exp_phi;
      a = '0; b = '0;
      for (int s = 0; s < 48; s++) begin
        ta[s] = 8'($urandom); tb[s] = 8'($urandom);
      end
      // a few two-ended hits with realistic time differences, some one-ended
      for (int k = 0; k < 3; k++) begin
        int s, dt;
        s = $urandom % 48;
        dt = int'($urandom % 160) - 80;
        a[s] = 1; b[s] = 1;
        tb[s] = 8'(100);
        ta[s] = 8'(100 + dt);
      end
      a[$urandom % 48] = 1;
      #1;
      exp_phi = '0;
      for (int s = 0; s < 48; s++) if (a[s] && b[s]) begin
        int dt;
        dt = int'(ta[s]) - int'(tb[s]);
        if (dt < -64) dt = -64;
        if (dt > 63) dt = 63;
        exp_phi[((dt + 64) * 48) / 128] = 1;
      end
      checks += 2;
      if (eta != (a | b)) failures++;
      if (phi != exp_phi) begin failures++; $display("FAIL phi %h exp %h", phi, exp_phi); end
    end
    // edge values
    a = '0; b = '0; a[0] = 1; b[0] = 1; ta[0] = 8'd0; tb[0] = 8'd200; #1;
    checks++; if (phi != 48'd1) failures++;
    ta[0] = 8'd200; tb[0] = 8'd0; #1;
    checks++; if (phi != (48'd1 << 47)) failures++;
    ta[0] = 8'd50; tb[0] = 8'd50; #1;
    checks++; if (phi != (48'd1 << 24)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
