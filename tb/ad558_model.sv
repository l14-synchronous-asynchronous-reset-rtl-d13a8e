// ad558_model: behavioural model of an AD558-style 8-bit D/A converter
// (not synthesizable logic: the real part is analog).
//
// While cs_n and ce_n are both low the input latch is transparent; code holds
// the last value when either rises. vout is the ideal output voltage for a
// 0 to 2.56 V range.
module ad558_model (
  input  logic       cs_n,
  input  logic       ce_n,
  input  logic [7:0] db,
  output logic [7:0] code,
  output real        vout
);
  initial code = 8'h00;
  always @* if (!cs_n && !ce_n) code = db;
  assign vout = 2.56 * real'(code) / 256.0;
endmodule
