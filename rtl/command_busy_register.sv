// command_busy_register: CIU Command Busy Register.
//
// Holds one busy flag per remote unit (RICE). The word assembler sets the
// flags of every unit it sends a command to. Each RICE drives a command-busy
// line back to the CIU (the fourth wire pair) while it executes a command.
// A flag is cleared when its line has been seen high and has fallen again;
// the unit is then also marked in a "done" word, and an interrupt is raised
// until the computer acknowledges it (the ack clears the done word). The
// flags can be read at any time, so the computer can avoid readdressing a
// busy unit except with a priority command.
// Document: one flag per unit, set on command request, reset on completion
// with an interrupt. Design choice: the seen-high-then-low rule (so a flag
// set before the remote line rises is not cleared early), the two-flop
// resynchronisation of the remote lines and the done word.
module command_busy_register #(
  parameter int unsigned N = 55
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         issue,        // strobe: a command goes to issue_mask
  input  logic [N-1:0] issue_mask,
  input  logic [N-1:0] busy_line,    // remote command-busy lines
  input  logic         irq_ack,
  output logic [N-1:0] busy,         // the register read by the computer
  output logic [N-1:0] done,         // units that completed since last ack
  output logic         irq
);
  logic [N-1:0] s1, s2, seen, fin;

  // units whose line was seen high and is now low again
  always_comb begin
    for (int i = 0; i < N; i++)
      fin[i] = busy[i] && seen[i] && !s2[i] && !(issue && issue_mask[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0;
      busy <= '0; seen <= '0; done <= '0;
    end else begin
      s1 <= busy_line;
      s2 <= s1;
      for (int i = 0; i < N; i++) begin
        if (issue && issue_mask[i]) begin
          busy[i] <= 1'b1;
          seen[i] <= 1'b0;
        end else if (busy[i]) begin
          if (s2[i]) seen[i] <= 1'b1;
          else if (seen[i]) begin
            busy[i] <= 1'b0;
            seen[i] <= 1'b0;
          end
        end
      end
      // a completion in the same clock as the ack is kept
      done <= (irq_ack ? '0 : done) | fin;
    end
  end

  assign irq = |done;
endmodule
