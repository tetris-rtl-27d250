// pixel_mux: combines the pixel drivers.
//
// Every driver raises its own active bit on the pixels it draws; the
// drivers are placed so that at most one is active at a time (one-hot).
// The output colour is then the OR of all colours masked by their active
// bits, which needs no priority logic; with no driver active the pixel is
// the background colour BG. An assertion checks the one-hot rule.
module pixel_mux #(
  parameter int N = 4,
  parameter logic [23:0] BG = 24'h000000
) (
  input  logic [N-1:0]       active,
  input  logic [N-1:0][23:0] rgb_in,
  output logic [23:0]        rgb
);
  always_comb begin
    rgb = (active == '0) ? BG : 24'h0;
    for (int i = 0; i < N; i++)
      if (active[i]) rgb = rgb | rgb_in[i];
  end

  always_comb assert ($onehot0(active)) else $error("pixel_mux: several drivers active: %b", active);
endmodule
