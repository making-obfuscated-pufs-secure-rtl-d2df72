// tb_apuf_switch_stage: checks that the switch stage adds the delay of the
// path taken, straight for c=0 and crossed for c=1, with four distinct delays.
module tb_apuf_switch_stage;
  import copuf_pkg::*;

  localparam fs_t DTS = 20100, DBS = 19800, DTC = 20500, DBC = 19300;

  logic c;
  fs_t  ti, bi, to, bo;
  int   checks = 0, failures = 0;

  apuf_switch_stage #(
    .D_TOP_STRAIGHT(DTS), .D_BOT_STRAIGHT(DBS),
    .D_TOP_CROSSED(DTC),  .D_BOT_CROSSED(DBC)
  ) dut (.c(c), .t_top_i(ti), .t_bot_i(bi), .t_top_o(to), .t_bot_o(bo));

  initial begin
    for (int i = 0; i < 200; i++) begin
      c  = 1'($urandom);
      ti = fs_t'($urandom_range(0, 2_000_000));
      bi = fs_t'($urandom_range(0, 2_000_000));
      #1;
      checks += 2;
      if (c) begin
        if (to != bi + DTC) failures++;
        if (bo != ti + DBC) failures++;
      end else begin
        if (to != ti + DTS) failures++;
        if (bo != bi + DBS) failures++;
      end
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
