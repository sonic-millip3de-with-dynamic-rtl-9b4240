// Receive select for one transducer bank. Transducer (x, y) belongs to bank
// (x mod SUB, y mod SUB), so every SUB x SUB window of the array, wherever it sits,
// holds exactly one transducer of each of the SUB*SUB banks, and each bank needs a
// single ADC and beamforming channel. Given the window origin, this block finds the
// bank's transducer inside the window: x = org_x + ((bank_x - org_x) mod SUB), and
// likewise for y. It outputs that transducer's position and its number inside the
// bank (sel_x = x / SUB, sel_y = y / SUB), which drives the bank's analog multiplexer.
// Purely combinational. That only one transducer per bank receives in any
// sub-aperture follows the design; the modulo banking pattern is this
// implementation's choice.
module bank_select #(
  parameter int ARR_X = 120,
  parameter int ARR_Y = 88,
  parameter int SUB   = 32,
  localparam int PW   = $clog2(ARR_X > ARR_Y ? ARR_X : ARR_Y),
  localparam int BW   = $clog2(SUB),
  localparam int SXW  = $clog2((ARR_X + SUB - 1) / SUB),
  localparam int SYW  = $clog2((ARR_Y + SUB - 1) / SUB)
) (
  input  logic [BW-1:0]  bank_x,
  input  logic [BW-1:0]  bank_y,
  input  logic [PW-1:0]  org_x,
  input  logic [PW-1:0]  org_y,
  output logic [PW-1:0]  tx,
  output logic [PW-1:0]  ty,
  output logic [SXW-1:0] sel_x,
  output logic [SYW-1:0] sel_y
);
  always_comb begin
    int ox, oy, dx, dy;
    ox = int'(org_x);
    oy = int'(org_y);
    dx = (int'(bank_x) - (ox % SUB) + SUB) % SUB;
    dy = (int'(bank_y) - (oy % SUB) + SUB) % SUB;
    tx = PW'(ox + dx);
    ty = PW'(oy + dy);
    sel_x = SXW'((ox + dx) / SUB);
    sel_y = SYW'((oy + dy) / SUB);
  end
endmodule
