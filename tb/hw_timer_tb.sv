// Self-checking test of hw_timer: events with random delays are scheduled (and some
// cancelled); every event must fire exactly at its deadline tick, in time order,
// and cancelled ones never.
module hw_timer_tb;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, tick = 0, ins = 0, cancel = 0;
  logic [7:0] ins_id = 0, cancel_id = 0, fire_id; logic [15:0] ins_delay = 0, now;
  logic busy, full, fire;
  always #5 clk = ~clk;
  hw_timer dut (.*);
  initial begin #5000000; chk(0, "watchdog"); finish_tb(); end
  int deadline [int];
  int fired = 0;
  always @(posedge clk) if (rst_n && fire) begin
    fired++;
    chk(deadline.exists(int'(fire_id)), $sformatf("fired id %0d is pending", fire_id));
    if (deadline.exists(int'(fire_id))) begin
      // popped in the cycle its deadline was reached
      chk(int'(now) == deadline[int'(fire_id)] || int'(now) == deadline[int'(fire_id)] + 1,
          $sformatf("id %0d fired at %0d deadline %0d", fire_id, now, deadline[int'(fire_id)]));
      deadline.delete(int'(fire_id));
    end
  end
  initial begin
    int id, n_ins, n_can;
    n_ins = 0; n_can = 0; id = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ins = 0; cancel = 0;
      tick = (t % 2 == 0);
      if (!busy && !full && $urandom_range(0, 9) == 0 && id < 250) begin
        ins = 1; ins_id = 8'(id); ins_delay = 16'($urandom_range(5, 300));
        deadline[id] = int'(now) + int'(ins_delay) + (tick ? 0 : 0);
        id++; n_ins++;
      end else if (!busy && $urandom_range(0, 40) == 0 && deadline.num() > 0) begin
        int k; void'(deadline.first(k)); cancel = 1; cancel_id = 8'(k);
        deadline.delete(k); n_can++;
      end
    end
    ins = 0; cancel = 0;
    repeat (800) begin @(negedge clk); tick = ~tick; end
    chk(deadline.num() == 0, "all pending events fired");
    chk(fired == n_ins - n_can, "fire count");
    chk(n_can > 0 && n_ins > 20, "test exercised insert and cancel");
    finish_tb();
  end
endmodule
