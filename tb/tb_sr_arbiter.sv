// tb_sr_arbiter: runs races with a 10 ps time step and checks the latch
// outputs every cycle: both high until the first edge arrives, then locked to
// the sign of t_top - t_bot (q=1 when the bottom edge wins), holding when the
// second edge arrives and returning to both high when launch drops.
module tb_sr_arbiter;
  import copuf_pkg::*;

  localparam fs_t STEP = 10000;

  logic clk = 0, rst_n, launch, top_sig, bot_sig, q, qb;
  fs_t  t_top, t_bot;
  int   checks = 0, failures = 0;
  int   n_top_first = 0, n_bot_first = 0, n_same_cycle = 0;

  always #5 clk = ~clk;

  sr_arbiter #(.CLK_FS(STEP)) dut (.clk, .rst_n, .launch, .t_top, .t_bot,
                                   .top_sig, .bot_sig, .q, .qb);

  task automatic race(input fs_t tt, input fs_t tb_);
    longint e;
    logic [1:0] exp_o, final_o;
    fs_t first;
    t_top = tt; t_bot = tb_;
    final_o = (tb_ < tt) ? 2'b10 : 2'b01;
    first   = (tb_ < tt) ? tb_ : tt;
    if ((tt / STEP) == (tb_ / STEP) || (tt % STEP == 0) || (tb_ % STEP == 0)) n_same_cycle++;
    else if (tt < tb_) n_top_first++;
    else n_bot_first++;
    launch = 1;
    e = 0;
    for (int k = 0; k < 40; k++) begin
      #1;
      exp_o = (e >= longint'(first)) ? final_o : 2'b11;
      checks++;
      if ({q, qb} !== exp_o) begin
        failures++;
        $display("t_top=%0d t_bot=%0d e=%0d got %b exp %b", tt, tb_, e, {q, qb}, exp_o);
      end
      @(negedge clk);
      e += STEP;
    end
    launch = 0;
    @(negedge clk);
    checks++;
    if ({q, qb} !== 2'b11) failures++;
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0; launch = 0; t_top = '0; t_bot = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if ({q, qb} !== 2'b11) failures++;
    race(25000, 51000);   // top first
    race(51000, 25000);   // bottom first
    race(23000, 27000);   // same cycle, top earlier
    race(27000, 23000);   // same cycle, bottom earlier
    race(33000, 33000);   // exact tie
    for (int i = 0; i < 100; i++)
      race(fs_t'($urandom_range(1000, 300000)), fs_t'($urandom_range(1000, 300000)));
    $display("top first %0d, bottom first %0d, same cycle %0d",
             n_top_first, n_bot_first, n_same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
