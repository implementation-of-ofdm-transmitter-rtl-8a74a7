// control_unit: sequences the OFDM transmitter one symbol at a time.
//
// While idle it pops the input FIFO (readreq) as soon as the FIFO is not
// empty; the popped nibble enters the QAM mapper in that same clock. It then
// stays busy until the output module reports the symbol's last word
// (symbol_done), so at most one symbol is ever inside the transmitter and no
// stage needs back-pressure. This controller is this implementation's own
// design: the description only names a control unit.
//
// Interface: readempty refers to a show-ahead FIFO whose head word is valid
// while it is not empty; readreq is combinational from readempty.
module control_unit (
  input  logic clock,
  input  logic arst_n,
  input  logic readempty,
  input  logic symbol_done,
  output logic readreq,
  output logic busy
);

  typedef enum logic {IDLE, BUSY} state_t;
  state_t state;

  assign readreq = (state == IDLE) & ~readempty;
  assign busy    = (state == BUSY);

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) state <= IDLE;
    else begin
      unique case (state)
        IDLE: if (readreq)     state <= BUSY;
        BUSY: if (symbol_done) state <= IDLE;
      endcase
    end
  end

endmodule
