// transport_delay: behavioural transport delay for the timing models of the
// delay elements and gates. Not synthesizable.
//
// Every change of `in` reappears on `out` exactly `dly` ps later, however
// close together the changes are (pure transport, no pulse rejection).
// Pending changes are kept in a queue of (due time, value) pairs and applied
// in order by one process; if `dly` is reduced while changes are pending, a
// new change is never applied before an older one. `dly` is read when the
// input changes. out starts at 0 and follows the input from its first change.
module transport_delay (
  input  logic in,
  input  real  dly,
  output logic out
);
  timeunit 1ps;
  timeprecision 1fs;

  realtime q_due [$];
  logic    q_val [$];
  event    pushed;

  initial out = 1'b0;

  always @(in) begin
    realtime due;
    due = $realtime + dly;
    if (q_due.size() > 0 && due < q_due[$]) due = q_due[$];
    q_due.push_back(due);
    q_val.push_back(in);
    ->pushed;
  end

  always begin
    if (q_due.size() == 0) @(pushed);
    #(q_due[0] - $realtime);
    out = q_val.pop_front();
    void'(q_due.pop_front());
  end
endmodule
