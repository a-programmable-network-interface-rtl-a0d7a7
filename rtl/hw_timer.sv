// hw_timer: hardware timer for protocol time-outs (fragment reassembly, TCP
// retransmission). It is a free-running tick counter, a memory of pending events kept
// sorted by expiry time, and a little control. ins schedules event ins_id to expire
// ins_delay ticks from now: the new entry is inserted at its place in time order by
// shifting the later entries down one slot, so the earliest event is always entry 0.
// cancel removes the event with id cancel_id. When entry 0 is due (now has reached its
// deadline, compared modulo 2**T_W) it is popped and reported on fire/fire_id for one
// cycle. One operation per cycle, in the order fire, cancel, insert; busy tells the
// caller that its insert or cancel was not taken this cycle. tick advances time
// (the clock divider is outside). The counter/ordered-memory structure follows the
// architecture; depth, widths and the shifting list are this design's choice.
module hw_timer #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned T_W     = 16,
  parameter int unsigned ID_W    = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic            ins,
  input  logic [ID_W-1:0] ins_id,
  input  logic [T_W-1:0]  ins_delay,
  input  logic            cancel,
  input  logic [ID_W-1:0] cancel_id,
  output logic            busy,
  output logic            full,
  output logic            fire,
  output logic [ID_W-1:0] fire_id,
  output logic [T_W-1:0]  now
);
  typedef struct packed {
    logic            v;
    logic [T_W-1:0]  t;
    logic [ID_W-1:0] id;
  } ev_t;

  ev_t         ev [ENTRIES];
  logic        due;
  logic [T_W-1:0] dl;
  logic [ENTRIES-1:0] later, match;

  // signed distance from now to the deadline decides order and expiry
  function automatic logic earlier(logic [T_W-1:0] a, logic [T_W-1:0] b, logic [T_W-1:0] n);
    return (a - n) < (b - n);
  endfunction

  assign dl   = now + ins_delay;
  assign due  = ev[0].v && (now - ev[0].t) < (1 << (T_W - 1));
  assign busy = due;
  assign full = ev[ENTRIES-1].v;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      later[i] = !ev[i].v || earlier(dl, ev[i].t, now);
      match[i] = ev[i].v && ev[i].id == cancel_id;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ev[i] <= '0;
      now <= '0; fire <= 1'b0; fire_id <= '0;
    end else begin
      fire <= 1'b0;
      if (tick) now <= now + 1'b1;
      if (due) begin
        fire    <= 1'b1;
        fire_id <= ev[0].id;
        for (int i = 0; i < ENTRIES - 1; i++) ev[i] <= ev[i+1];
        ev[ENTRIES-1] <= '0;
      end else if (cancel && match != '0) begin
        // close the gap left by every matching entry
        for (int i = 0; i < ENTRIES; i++) begin
          int unsigned k;
          k = 0;
          for (int j = 0; j <= i; j++) if (match[j]) k++;
          if (i + k < ENTRIES) ev[i] <= ev[i+k];
          else                 ev[i] <= '0;
        end
      end else if (ins && !full) begin
        // first slot whose event expires later (or is empty) takes the new one
        for (int i = ENTRIES - 1; i >= 0; i--) begin
          if (later[i]) begin
            if (i == 0 || !later[i-1]) ev[i] <= '{v: 1'b1, t: dl, id: ins_id};
            else                       ev[i] <= ev[i-1];
          end
        end
      end
    end
  end
endmodule
