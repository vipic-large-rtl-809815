// Self-checking testbench of vipic_sparsifier.
//
// Applies random request patterns (sparse and dense) and pixel data to a 64-pixel
// sparsifier and checks, against a reference scan written here, that the lowest
// requesting index is chosen, that only that pixel sees the ack-hit level while
// all others see high, and that its data is on the bus.
module tb_vipic_sparsifier;
  localparam int N = 64;
  logic [N-1:0]  req, ack_pix;
  logic [19:0]   pix_data [N];
  logic          ack_mod, sel_valid;
  logic [5:0]    sel_addr;
  logic [19:0]   bus_data;
  int checks = 0, failures = 0;

  vipic_sparsifier #(.N(N)) dut (.req, .pix_data, .ack_mod, .ack_pix,
                                 .sel_valid, .sel_addr, .bus_data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int exp_sel;
      logic [N-1:0] exp_ack;
      req = {$urandom, $urandom};
      if (t % 4 == 1) req = req & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 4 == 2) req = N'(1) << ($urandom % N);
      if (t % 40 == 3) req = '0;
      ack_mod = $urandom % 2;
      foreach (pix_data[i]) pix_data[i] = 20'($urandom);
      #1;
      exp_sel = -1;
      for (int i = 0; i < N; i++)
        if (req[i] && exp_sel < 0) exp_sel = i;
      exp_ack = '1;
      if (exp_sel >= 0) exp_ack[exp_sel] = ack_mod;
      checks++;
      if (sel_valid != (exp_sel >= 0) || ack_pix != exp_ack ||
          (exp_sel >= 0 && (sel_addr != 6'(exp_sel) || bus_data != pix_data[exp_sel])) ||
          (exp_sel < 0 && bus_data != 0)) begin
        failures++;
        $display("FAIL t=%0d req=%h sel=%0d exp=%0d", t, req, sel_addr, exp_sel);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
