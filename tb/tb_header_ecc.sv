// tb_header_ecc -- self-checking test of the packet header ECC checker.
//
// The reference ECC is computed here from the six parity equations of the
// CSI-2 header code written out bit by bit (P0..P5 as XORs of the listed
// header bits, P6 = P7 = 0), independently of the column table in the DUT.
// Cases, each applied with hdr_valid for one clock:
//   * random headers with correct ECC: no_error, header unchanged;
//   * every single header-bit flip and every single ECC-bit flip:
//     corrected_error, header restored;
//   * random double-bit flips: higher_order_error (never a false correction
//     of the header for flips of two header bits);
//   * hdr_valid low: outputs hold.
module tb_header_ecc;

  logic        clk = 0, rst_n = 0;
  logic        hdr_valid = 0;
  logic [7:0]  ecc_in = 0;
  logic [1:0]  vc_in = 0;
  logic [5:0]  dt_in = 0;
  logic [15:0] wc_in = 0;
  logic        valid, no_error, corrected_error, higher_order_error;
  logic [23:0] header_out;

  int checks = 0, failures = 0;
  int n_clean = 0, n_fixed = 0, n_double = 0;

  always #5 clk = !clk;

  header_ecc dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] ref_ecc(input logic [23:0] d);
    logic [7:0] p = '0;
    p[0] = d[0]^d[1]^d[2]^d[4]^d[5]^d[7]^d[10]^d[11]^d[13]^d[16]^d[20]^d[21]^d[22]^d[23];
    p[1] = d[0]^d[1]^d[3]^d[4]^d[6]^d[8]^d[10]^d[12]^d[14]^d[17]^d[20]^d[21]^d[22]^d[23];
    p[2] = d[0]^d[2]^d[3]^d[5]^d[6]^d[9]^d[11]^d[12]^d[15]^d[18]^d[20]^d[21]^d[22];
    p[3] = d[1]^d[2]^d[3]^d[7]^d[8]^d[9]^d[13]^d[14]^d[15]^d[19]^d[20]^d[21]^d[23];
    p[4] = d[4]^d[5]^d[6]^d[7]^d[8]^d[9]^d[16]^d[17]^d[18]^d[19]^d[20]^d[22]^d[23];
    p[5] = d[10]^d[11]^d[12]^d[13]^d[14]^d[15]^d[16]^d[17]^d[18]^d[19]^d[21]^d[22]^d[23];
    return p;
  endfunction

  // apply one header (data bits d, ecc e) and return the registered result
  task automatic apply(input logic [23:0] d, input logic [7:0] e);
    @(negedge clk);
    {wc_in, vc_in, dt_in} = d;
    ecc_in    = e;
    hdr_valid = 1;
    @(negedge clk);
    hdr_valid = 0;
    check(valid, "valid follows hdr_valid");
  endtask

  initial begin
    logic [23:0] h, hx;
    logic [7:0]  e;
    int a, b;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int n = 0; n < 300; n++) begin
      h = 24'($urandom);
      if (n == 0) h = '0;
      if (n == 1) h = '1;
      apply(h, ref_ecc(h));
      check(no_error && !corrected_error && !higher_order_error, "clean header flagged");
      check(header_out == h, "clean header changed");
      n_clean++;
    end

    for (int n = 0; n < 40; n++) begin
      h = 24'($urandom);
      for (int bit_i = 0; bit_i < 24; bit_i++) begin
        hx = h ^ (24'd1 << bit_i);
        apply(hx, ref_ecc(h));
        check(!no_error && corrected_error && !higher_order_error,
              $sformatf("header bit %0d flip not corrected", bit_i));
        check(header_out == h, $sformatf("header bit %0d flip: %h expected %h", bit_i, header_out, h));
        n_fixed++;
      end
      for (int bit_i = 0; bit_i < 6; bit_i++) begin
        apply(h, ref_ecc(h) ^ (8'd1 << bit_i));
        check(!no_error && corrected_error && !higher_order_error,
              $sformatf("ECC bit %0d flip not flagged as corrected", bit_i));
        check(header_out == h, "ECC bit flip changed the header");
        n_fixed++;
      end
    end

    for (int n = 0; n < 2000; n++) begin
      h = 24'($urandom);
      a = $urandom_range(0, 29);
      do b = $urandom_range(0, 29); while (b == a);
      hx = h;
      e  = ref_ecc(h);
      if (a < 24) hx[a] = !hx[a]; else e[a-24] = !e[a-24];
      if (b < 24) hx[b] = !hx[b]; else e[b-24] = !e[b-24];
      apply(hx, e);
      check(!no_error && !corrected_error && higher_order_error,
            $sformatf("double flip %0d,%0d not flagged", a, b));
      n_double++;
    end

    // outputs hold while hdr_valid is low
    h = 24'h12_34_2B;
    apply(h, ref_ecc(h));
    @(negedge clk);
    {wc_in, vc_in, dt_in} = '1;
    ecc_in = 8'hFF;
    repeat (3) @(negedge clk);
    check(!valid && no_error && header_out == h, "outputs hold without hdr_valid");

    check(n_clean == 300 && n_fixed == 40 * 30 && n_double == 2000, "case counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
