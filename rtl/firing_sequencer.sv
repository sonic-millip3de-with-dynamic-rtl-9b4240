// Firing sequencer for the sliding receive sub-aperture. A SUB x SUB (32x32) receive
// window and the virtual source at its centre slide over the ARR_X x ARR_Y (120x88)
// transducer array in steps of STEP (8) elements: (120-32)/8+1 = 12 positions across
// and (88-32)/8+1 = 8 down, 96 firings per frame. The window moves along x first and
// then steps down in y.
// Interface: frame_start puts the window at (0,0) and raises `active`; each `next`
// pulse moves to the following firing; after the last firing, `next` drops `active`
// and pulses frame_done for one cycle. org_* is the window's first element,
// vs_* the element at its centre (origin + SUB/2), firing the firing number.
// Window size, step, array size and count follow the design; the scan order (x
// first) and the virtual-source reference point are this implementation's choice.
module firing_sequencer #(
  parameter int ARR_X = 120,
  parameter int ARR_Y = 88,
  parameter int SUB   = 32,
  parameter int STEP  = 8,
  localparam int NX   = (ARR_X - SUB) / STEP + 1,
  localparam int NY   = (ARR_Y - SUB) / STEP + 1,
  localparam int PW   = $clog2(ARR_X > ARR_Y ? ARR_X : ARR_Y),
  localparam int FW   = $clog2(NX * NY + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  logic          next,
  output logic [PW-1:0] org_x,
  output logic [PW-1:0] org_y,
  output logic [PW-1:0] vs_x,
  output logic [PW-1:0] vs_y,
  output logic [FW-1:0] firing,
  output logic          active,
  output logic          frame_done
);
  assign vs_x = org_x + PW'(SUB / 2);
  assign vs_y = org_y + PW'(SUB / 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      org_x      <= '0;
      org_y      <= '0;
      firing     <= '0;
      active     <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (frame_start) begin
        org_x  <= '0;
        org_y  <= '0;
        firing <= '0;
        active <= 1'b1;
      end else if (next && active) begin
        if (firing == FW'(NX * NY - 1)) begin
          active     <= 1'b0;
          frame_done <= 1'b1;
        end else begin
          firing <= firing + 1'b1;
          if (org_x == PW'((NX - 1) * STEP)) begin
            org_x <= '0;
            org_y <= org_y + PW'(STEP);
          end else begin
            org_x <= org_x + PW'(STEP);
          end
        end
      end
    end
  end
endmodule
