// selection: selection and address decoder.
//
// On `start` it walks the error memory from address 0 to POP-1, one entry per
// cycle (it drives the memory's read address `raddr`), and keeps the entry
// with the lowest error. On a tie the later entry wins, so an offspring that
// is as good as its parent replaces it. It then raises `done` for one cycle
// with the winner's address on `best_idx` and its error on `best_err`.
// Latency: POP + 1 cycles from start to done. The document names this unit;
// choosing the single best member (elitist selection) is this design's
// choice.
module selection #(
  parameter int unsigned POP = 8,
  parameter int unsigned EW  = 14,
  localparam int unsigned AW = (POP > 1) ? $clog2(POP) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] raddr,
  input  logic [EW-1:0] rdata,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] best_idx,
  output logic [EW-1:0] best_err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      best_idx <= '0;
      best_err <= '1;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        raddr    <= '0;
        busy     <= 1'b1;
        best_err <= '1;
        best_idx <= '0;
      end else if (busy) begin
        if (rdata <= best_err) begin
          best_err <= rdata;
          best_idx <= raddr;
        end
        if (32'(raddr) == POP - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          raddr <= raddr + 1'b1;
        end
      end
    end
  end

endmodule
