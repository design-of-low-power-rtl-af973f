// Behavioural model (not synthesizable) of the low-power capacitive
// charge-sharing pixel: sensor plate, unit-gain/attenuating sense buffer,
// three-transistor inverter and comparator of one 58 um x 58 um pixel.
//
// The finger is the upper plate of a capacitor Cf to the pixel's metal
// plate: large on a ridge (`contact` = 1), small over a valley. The model
// follows the cell's three phases, driven by the sensor controller:
//   precharge  (phi1 high):  node Cp2 and Vsa at VDD, node Cp1 at ground;
//   unit-gain  (phi1 falls): charge is shared, so
//                Vsa = VDD*(Cp2+Cf)/(Cp1+Cp2+Cf),
//              higher on a ridge; the buffer keeps the plate shield at Vsa
//              so the large Cp3 carries no charge and drops out;
//   sensing    (sw1 rises):  the 3T inverter, whose switching point lies
//              below VDD/2, turns Vsa into the full-swing Vsa1: about 0 V
//              on a ridge, VDD over a valley;
//   evaluate   (sa_en rises): the comparator latches `pix` = 1 (black)
//              when Vsa1 is low. After the decision the cell's static
//              current path is cut (M5); the model notes this in
//              `static_on`, an output of the model only, which is 1 from sw1 rising to the decision.
// Phase order and the full-swing Vsa1 follow the source. The capacitances
// and the inverter threshold are assumed values chosen so that the
// unit-gain ridge/valley difference is about 0.61 V, the figure the source
// reports for this phase; the sensor's analog timing is not modelled.
module sense_pixel #(
  parameter int VDD_MV       = 3300,  // supply, mV
  parameter int CP1_FF       = 30,    // parasitic routing capacitance at Cp1
  parameter int CP2_FF       = 10,    // parasitic routing capacitance at Cp2
  parameter int CF_RIDGE_FF  = 32,    // finger capacitance on a ridge
  parameter int CF_VALLEY_FF = 10,    // finger capacitance over a valley
  parameter int VTH_INV_MV   = 1600   // 3T inverter switching point, < VDD/2
) (
  input  logic phi1,
  input  logic sw1,
  input  logic sa_en,
  input  logic contact,
  output logic pix,
  output logic static_on   // model only: cell draws static current
);

  int vsa;    // node voltages in mV
  int vsa1;
  logic phi1_q, sw1_q, sa_en_q;   // previous phase levels, for edge detection

  initial begin
    vsa       = 0;
    vsa1      = 0;
    pix       = 1'b0;
    static_on = 1'b0;
    phi1_q    = 1'b0;
    sw1_q     = 1'b0;
    sa_en_q   = 1'b0;
  end

  // One process for all phase edges, so each node has a single driver.

  always @(phi1 or sw1 or sa_en) begin
    if (phi1 && !phi1_q) begin                 // precharge
      vsa       <= VDD_MV;
      static_on <= 1'b0;
    end
    if (!phi1 && phi1_q)                       // charge sharing
      vsa <= contact ? VDD_MV * (CP2_FF + CF_RIDGE_FF)  / (CP1_FF + CP2_FF + CF_RIDGE_FF)
                     : VDD_MV * (CP2_FF + CF_VALLEY_FF) / (CP1_FF + CP2_FF + CF_VALLEY_FF);
    if (sw1 && !sw1_q) begin                   // sensing: 3T inverter
      vsa1      <= (vsa < VTH_INV_MV) ? VDD_MV : 0;
      static_on <= 1'b1;
    end
    if (sa_en && !sa_en_q) begin               // comparator decision, M5 off
      pix       <= (vsa1 < VDD_MV / 2);
      static_on <= 1'b0;
    end
    phi1_q  <= phi1;
    sw1_q   <= sw1;
    sa_en_q <= sa_en;
  end

endmodule
