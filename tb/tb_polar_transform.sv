// tb_polar_transform: random u vectors through 16- and 8-bit transforms,
// compared with the recursive reference encoder; applying the transform
// twice must return u.
module tb_polar_transform;
  import polar_ref_pkg::*;
  logic [15:0] u16, x16, y16;
  logic [7:0]  u8, x8;
  int unsigned checks = 0, failures = 0;

  polar_transform #(.N(16)) dut16 (.u(u16), .x(x16));
  polar_transform #(.N(16)) dut16b (.u(x16), .x(y16));
  polar_transform #(.N(8)) dut8 (.u(u8), .x(x8));

  initial begin
    for (int t = 0; t < 1000; t++) begin
      bit u[], x[];
      logic [15:0] e16;
      logic [7:0]  e8;
      u16 = 16'($urandom);
      u8  = 8'($urandom);
      #1;
      u = new[16];
      for (int i = 0; i < 16; i++) u[i] = u16[i];
      encode(u, x);
      for (int i = 0; i < 16; i++) e16[i] = x[i];
      u = new[8];
      for (int i = 0; i < 8; i++) u[i] = u8[i];
      encode(u, x);
      for (int i = 0; i < 8; i++) e8[i] = x[i];
      checks += 3;
      if (x16 !== e16) failures++;
      if (y16 !== u16) failures++;
      if (x8 !== e8) failures++;
    end
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
